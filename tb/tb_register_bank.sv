// tb_register_bank: checks the visible/shadow register file against a
// reference array model under random writes, swaps, shadow copies and the
// accumulator/R1 side ports (one operation per cycle, as the PE issues).
module tb_register_bank;
  logic clk = 0, rst_n = 0;
  logic [2:0] sel;
  logic wr_en, swap_en, movrs_en, acc_we, r1_we;
  logic [15:0] wr_data, acc_d, r1_d;
  logic [15:0] regs [8];
  logic [15:0] shadow [8];
  logic [15:0] mr [8], ms [8], t;
  int checks = 0, failures = 0;

  register_bank #(.NREGS(8), .W(16)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    {wr_en, swap_en, movrs_en, acc_we, r1_we} = '0;
    sel = 0; wr_data = 0; acc_d = 0; r1_d = 0;
    for (int i = 0; i < 8; i++) begin mr[i] = 0; ms[i] = 0; end
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int it = 0; it < 4000; it++) begin
      @(negedge clk);
      {wr_en, swap_en, movrs_en, acc_we, r1_we} = '0;
      sel = 3'($urandom); wr_data = 16'($urandom); acc_d = 16'($urandom); r1_d = 16'($urandom);
      case ($urandom_range(0, 4))
        0: begin wr_en = 1; mr[sel] = wr_data; end
        1: begin swap_en = 1; t = mr[sel]; mr[sel] = ms[sel]; ms[sel] = t; end
        2: begin movrs_en = 1; mr[sel] = ms[sel]; end
        3: begin acc_we = 1; mr[0] = acc_d; end
        default: begin r1_we = 1; mr[1] = r1_d; end
      endcase
      @(posedge clk); #1;
      for (int i = 0; i < 8; i++) begin
        checks += 2;
        if (regs[i] !== mr[i] || shadow[i] !== ms[i]) begin
          failures++;
          $display("FAIL it=%0d R%0d=%h/%h SR%0d=%h/%h", it, i, regs[i], mr[i], i, shadow[i], ms[i]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
