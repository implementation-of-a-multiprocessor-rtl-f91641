// tb_mp_row: one row of 4 PEs. Checks the one-cycle input register (an
// instruction takes effect two edges after it is applied), per-PE
// selection, the row spike chain (row_any), the column outputs gated by
// row_en, the reset of the PE picked by col_sel, and read-back of the
// addressed PE's external buffer.
module tb_mp_row;
  import heens_pkg::*;
  localparam int COLS = 4;
  logic clk = 0, rst_n = 0;
  pe_instr_t instr_i;
  cfg_t cfg_i;
  spike_t spike_i;
  logic spk_clr_i;
  logic [6:0] own_chip = 1;
  logic [2:0] dist_layer;
  logic [COLS-1:0] col_in, col_out, col_sel;
  logic row_any, row_en;
  logic [31:0] rb_bram;
  logic [15:0] rb_buf;
  int checks = 0, failures = 0;

  mp_row #(.ROW(1), .COLS(COLS)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input string w, input logic [31:0] g, input logic [31:0] e);
    checks++;
    if (g !== e) begin failures++; $display("FAIL %s got=%h exp=%h", w, g, e); end
  endtask

  task automatic ex1(input opcode_e op, input int operand, input logic [15:0] data,
                     input bit all, input int col);
    instr_i.op = op; instr_i.operand = 10'(operand); instr_i.data = data;
    instr_i.sel_all = all; instr_i.sel_row = 1; instr_i.sel_col = 5'(col);
    @(negedge clk);
    instr_i.op = OP_NOP;
  endtask

  initial begin
    instr_i = '0; cfg_i = '0; spike_i = '0; spk_clr_i = 0; dist_layer = 0;
    col_in = 0; col_sel = 0; row_en = 0;
    @(negedge clk); rst_n = 1; @(negedge clk);
    ex1(OP_LDALL, 0, 16'h0001, 0, 1);
    chk("input register delays one cycle", dut.g_pe[1].u_pe.regs_o[0], 0);
    @(negedge clk);
    chk("PE1 loaded", dut.g_pe[1].u_pe.regs_o[0], 1);
    chk("PE0 untouched", dut.g_pe[0].u_pe.regs_o[0], 0);
    ex1(OP_LDALL, 0, 16'h0001, 0, 3);
    ex1(OP_STOREPS, 0, 0, 1, 0);           // all PEs store ACC(0): PEs 1 and 3 spike
    ex1(OP_STOREB, 0, 0, 1, 0);
    @(negedge clk);
    chk("row_any", row_any, 1);
    chk("col_out without row_en", col_out, 0);
    row_en = 1; #1;
    chk("col_out with row_en", col_out, 4'b1010);
    col_in = 4'b0100; #1;
    chk("col chain", col_out, 4'b1110);
    col_in = 0;
    col_sel = 4'b0010; @(negedge clk);
    chk("PE1 reset", col_out, 4'b1000);
    col_sel = 4'b1000; @(negedge clk);
    col_sel = 0;
    chk("row empty", row_any, 0);
    instr_i.sel_all = 0; instr_i.sel_row = 1; instr_i.sel_col = 3;
    repeat (2) @(negedge clk);
    chk("read-back buffer PE3", rb_buf, 1);
    instr_i.sel_col = 0; repeat (2) @(negedge clk);
    chk("read-back buffer PE0", rb_buf, 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
