// tb_snbram: checks the synapse/neuron memory: setup writes through the
// configuration port, read of word BP one cycle later, STORESP-style
// writes that post-increment BP, BP clear, and read-back of everything
// written against a reference array.
module tb_snbram;
  logic clk = 0, rst_n = 0;
  logic bp_clr, we, cfg_we;
  logic [31:0] wdata, cfg_data, rdata;
  logic [9:0] cfg_addr, bp;
  logic [31:0] m [1024];
  int checks = 0, failures = 0;

  snbram #(.DEPTH(1024), .W(32)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input string w, input logic [31:0] g, input logic [31:0] e);
    checks++;
    if (g !== e) begin failures++; $display("FAIL %s got=%h exp=%h", w, g, e); end
  endtask

  initial begin
    bp_clr = 0; we = 0; cfg_we = 0; wdata = 0; cfg_data = 0; cfg_addr = 0;
    @(negedge clk); rst_n = 1;
    // setup writes
    for (int i = 0; i < 1024; i++) begin
      cfg_we = 1; cfg_addr = 10'(i); cfg_data = 32'($urandom); m[i] = cfg_data;
      @(negedge clk);
    end
    cfg_we = 0;
    @(negedge clk);
    chk("bp0", 32'(bp), 0);
    chk("rd0", rdata, m[0]);
    // STORESP-style writes with post-increment
    for (int i = 0; i < 300; i++) begin
      we = 1; wdata = 32'($urandom); m[bp] = wdata;
      @(negedge clk);
      we = 0;
      chk("bp inc", 32'(bp), 32'(i + 1));
      chk("rd at bp", rdata, m[bp]);
    end
    bp_clr = 1; @(negedge clk); bp_clr = 0;
    chk("bp clr", 32'(bp), 0);
    // walk BP through memory by dummy re-writes of the same value
    for (int i = 0; i < 1024; i++) begin
      chk("walk", rdata, m[bp]);
      we = 1; wdata = m[bp];
      @(negedge clk);
      we = 0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
