// tb_lfsr: checks the 64-bit noise generator: reset value, seed loading
// into both halves, one step per enabled cycle against a reference
// recurrence (taps 64,63,61,60), hold while disabled, and that the
// sequence does not repeat within the first thousand states.
module tb_lfsr;
  logic clk = 0, rst_n = 0;
  logic enable, seed_we;
  logic [31:0] seed;
  logic [63:0] state, m;
  int checks = 0, failures = 0;
  logic [63:0] seen [1000];

  lfsr #(.W(64)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input string w, input logic [63:0] e);
    checks++;
    if (state !== e) begin failures++; $display("FAIL %s got=%h exp=%h", w, state, e); end
  endtask

  initial begin
    enable = 0; seed_we = 0; seed = 0;
    @(posedge clk); #1 chk("reset", 64'd1);
    @(negedge clk); rst_n = 1;
    seed = 32'hDEAD_BEEF; seed_we = 1;
    @(negedge clk); seed_we = 0;
    chk("seed", 64'hDEADBEEF_DEADBEEF);
    m = state;
    enable = 1;
    for (int i = 0; i < 1000; i++) begin
      @(negedge clk);
      m = {m[62:0], m[63] ^ m[62] ^ m[60] ^ m[59]};
      chk("step", m);
      seen[i] = state;
    end
    enable = 0;
    repeat (5) @(negedge clk);
    chk("hold", m);
    for (int i = 1; i < 1000; i++) begin
      checks++;
      if (seen[i] == seen[0]) begin failures++; $display("FAIL repeat at %0d", i); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
