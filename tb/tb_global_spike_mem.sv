// tb_global_spike_mem: programs encoding and conversion tables for both
// the chip-id path and the neuron-address path, sends random remote
// spikes and compares the global spike register with a model (OR of the
// AND of both masks), three cycles after each spike.
module tb_global_spike_mem;
  import heens_pkg::*;
  logic clk = 0, rst_n = 0;
  logic cfg_we, spk_valid, clr;
  cfg_mem_e cfg_mem;
  logic [10:0] cfg_addr, spk_addr;
  logic [31:0] cfg_data, spk_reg, m;
  logic [6:0] spk_id;
  logic [4:0] eid [128];
  logic [4:0] erc [2048];
  logic [31:0] cid [32];
  logic [31:0] crc [32];
  int checks = 0, failures = 0, hits = 0;

  global_spike_mem #(.GLOBAL_SYN(32), .CODE_W(5), .ID_W(7), .ADDR_W(11)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic wr(input cfg_mem_e mm, input int a, input logic [31:0] d);
    cfg_we = 1; cfg_mem = mm; cfg_addr = 11'(a); cfg_data = d;
    @(negedge clk);
    cfg_we = 0;
  endtask

  initial begin
    cfg_we = 0; spk_valid = 0; clr = 0; cfg_addr = 0; spk_addr = 0; cfg_data = 0;
    cfg_mem = CFG_SNBRAM; spk_id = 0; m = 0;
    @(negedge clk); rst_n = 1;
    for (int i = 0; i < 128; i++)  begin eid[i] = 5'($urandom); wr(CFG_GENC_ID, i, 32'(eid[i])); end
    for (int i = 0; i < 2048; i++) begin erc[i] = 5'($urandom); wr(CFG_GENC_RC, i, 32'(erc[i])); end
    for (int i = 0; i < 32; i++)   begin cid[i] = $urandom; wr(CFG_GCONV_ID, i, cid[i]); end
    for (int i = 0; i < 32; i++)   begin crc[i] = $urandom & $urandom & $urandom; wr(CFG_GCONV_RC, i, crc[i]); end
    clr = 1; @(negedge clk); clr = 0;
    for (int k = 0; k < 300; k++) begin
      if (k % 60 == 0) begin clr = 1; @(negedge clk); clr = 0; m = 0; end
      spk_valid = 1; spk_id = 7'($urandom); spk_addr = 11'($urandom);
      @(negedge clk); spk_valid = 0;
      repeat (2) @(negedge clk);
      if ((cid[eid[spk_id]] & crc[erc[spk_addr]]) & ~m) hits++;
      m |= cid[eid[spk_id]] & crc[erc[spk_addr]];
      checks++;
      if (spk_reg !== m) begin failures++; $display("FAIL reg %h exp %h", spk_reg, m); end
    end
    checks++;
    if (hits == 0) begin failures++; $display("FAIL no global spike matched"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
