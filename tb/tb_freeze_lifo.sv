// tb_freeze_lifo: random push/pop sequences against a queue model; checks
// the stack contents and that no_freeze is high exactly when every entry
// is zero (nested if/end-if behaviour).
module tb_freeze_lifo;
  logic clk = 0, rst_n = 0;
  logic push, push_val, pop;
  logic [7:0] lifo, m;
  logic no_freeze;
  int checks = 0, failures = 0, nested = 0;

  freeze_lifo #(.DEPTH(8)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    push = 0; pop = 0; push_val = 0; m = 0;
    @(negedge clk); rst_n = 1;
    for (int it = 0; it < 3000; it++) begin
      @(negedge clk);
      push = 0; pop = 0;
      push_val = ($urandom_range(0, 3) == 0);
      if ($urandom_range(0, 1)) begin push = 1; m = {m[6:0], push_val}; end
      else begin pop = 1; m = {1'b0, m[7:1]}; end
      @(posedge clk); #1;
      if (m[1] && m[0]) nested++;
      checks += 2;
      if (lifo !== m) begin failures++; $display("FAIL lifo %b exp %b", lifo, m); end
      if (no_freeze !== (m == 0)) begin failures++; $display("FAIL no_freeze"); end
    end
    checks++;
    if (nested == 0) begin failures++; $display("FAIL no nested freeze seen"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
