// tb_local_spike_mem: programs a random connection table, sends random
// spike addresses and compares the local spike register with a model
// (entry k>0 sets synapse k-1, entry 0 is ignored); also checks the
// clear and the two-cycle lookup-to-register latency.
module tb_local_spike_mem;
  logic clk = 0, rst_n = 0;
  logic cfg_we, spk_valid, clr;
  logic [10:0] cfg_addr, spk_addr;
  logic [6:0] cfg_data;
  logic [99:0] spk_reg, m;
  logic [6:0] tab [2048];
  int checks = 0, failures = 0;

  local_spike_mem #(.LOCAL_SYN(100), .ADDR_W(11), .DATA_W(7)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    cfg_we = 0; spk_valid = 0; clr = 0; cfg_addr = 0; spk_addr = 0; cfg_data = 0; m = '0;
    @(negedge clk); rst_n = 1;
    for (int i = 0; i < 2048; i++) begin
      cfg_we = 1; cfg_addr = 11'(i);
      cfg_data = ($urandom_range(0, 3) == 0) ? 7'($urandom_range(1, 100)) : 7'd0;
      tab[i] = cfg_data;
      @(negedge clk);
    end
    cfg_we = 0;
    for (int round = 0; round < 5; round++) begin
      clr = 1; @(negedge clk); clr = 0; m = '0;
      checks++; if (spk_reg !== '0) begin failures++; $display("FAIL clear"); end
      for (int k = 0; k < 200; k++) begin
        spk_valid = 1; spk_addr = 11'($urandom);
        @(negedge clk);
        spk_valid = 0;
        checks++;
        if (spk_reg !== m) begin failures++; $display("FAIL early update"); end
        @(negedge clk);
        if (tab[spk_addr] != 0) m[tab[spk_addr] - 1] = 1'b1;
        checks++;
        if (spk_reg !== m) begin failures++; $display("FAIL reg %h exp %h", spk_reg, m); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
