// tb_processing_element: directed program run on one PE (row 2, column 3).
// Instructions are applied one per cycle as the array delivers them.
// Expected values are worked out by hand in the comments. Covers PE
// selection, register opcodes, ALU with two-cycle MUL/MULS, freeze
// nesting, LFSR seed/read, memory setup/LOADSN/LOADSP/STORESP with BP,
// local and global input spikes, STOREB, STOREPS and the spike
// read-and-reset chain.
module tb_processing_element;
  import heens_pkg::*;
  logic clk = 0, rst_n = 0;
  pe_instr_t instr;
  cfg_t cfg;
  spike_t spike_in;
  logic [6:0] own_chip = 7'd9;
  logic spk_clr;
  logic [2:0] dist_layer;
  logic row_in, row_out, col_in, col_out, row_en, row_sel, col_sel, selected;
  logic [31:0] rb_bram;
  logic [15:0] ext_buffer;
  logic [15:0] regs_o [8];
  logic [7:0] si_o;
  int checks = 0, failures = 0;

  processing_element #(.ROW(2), .COL(3)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input string w, input logic [31:0] g, input logic [31:0] e);
    checks++;
    if (g !== e) begin failures++; $display("FAIL %s got=%h exp=%h", w, g, e); end
  endtask

  task automatic ex(input opcode_e op, input int operand = 0, input logic [15:0] data = 0);
    instr.op = op; instr.operand = 10'(operand); instr.data = data;
    @(negedge clk);
    if (op == OP_MUL || op == OP_MULS) @(negedge clk);   // held two cycles
    instr.op = OP_NOP;
  endtask

  task automatic cfgw(input cfg_mem_e mm, input int a, input logic [31:0] d);
    cfg.we = 1; cfg.mem = mm; cfg.addr = 11'(a); cfg.data = d; cfg.row = 2; cfg.col = 3;
    @(negedge clk);
    cfg.we = 0;
  endtask

  initial begin
    instr = '0; instr.sel_all = 1; cfg = '0; spike_in = '0; spk_clr = 0; dist_layer = 0;
    row_in = 0; col_in = 0; row_en = 0; row_sel = 0; col_sel = 0;
    @(negedge clk); rst_n = 1; @(negedge clk);
    // register opcodes
    ex(OP_LDALL, 2, 16'h1234);            chk("LDALL R2", regs_o[2], 16'h1234);
    ex(OP_SET, 5);                         chk("SET R5", regs_o[5], 16'hFFFF);
    ex(OP_RST, 5);                         chk("RST R5", regs_o[5], 0);
    // selection: other PE addressed -> no effect, this PE addressed -> effect
    instr.sel_all = 0; instr.sel_row = 2; instr.sel_col = 4;
    ex(OP_LDALL, 3, 16'hAAAA);             chk("unselected", regs_o[3], 0);
    chk("selected flag low", selected, 0);
    instr.sel_col = 3;
    ex(OP_LDALL, 3, 16'h5555);             chk("selected", regs_o[3], 16'h5555);
    instr.sel_all = 1;
    // ALU
    ex(OP_MOVA, 2);                        chk("MOVA", regs_o[0], 16'h1234);
    ex(OP_ADD, 2);                         chk("ADD", regs_o[0], 16'h2468);
    ex(OP_LDALL, 4, 16'h7000);
    ex(OP_ADD, 4);                         chk("ADD sat", regs_o[0], 16'h7FFF);
    ex(OP_MOVR, 6);                        chk("MOVR", regs_o[6], 16'h7FFF);
    ex(OP_LDALL, 0, 16'hFF00);             // ACC = -256
    ex(OP_LDALL, 2, 16'h0300);             // 768
    ex(OP_MUL, 2);                         // -196608 = 0xFFFD_0000
    chk("MUL hi", regs_o[0], 16'hFFFD);    chk("MUL lo", regs_o[1], 16'h0000);
    ex(OP_LDALL, 0, 16'h4000);
    ex(OP_MULS, 2);                        // 0x4000*0x300 = 0x00C0_0000
    chk("MULS", regs_o[0], 16'h00C0);
    // swap / shadow
    ex(OP_SWAPS, 2);                       chk("SWAPS R2", regs_o[2], 0);
    ex(OP_MOVRS, 2);                       chk("MOVRS R2", regs_o[2], 16'h0300);
    // freeze: C=1 -> FREEZEC freezes; nested FREEZENZ; UNFREEZE twice
    ex(OP_SETC);
    ex(OP_FREEZEC);
    ex(OP_LDALL, 4, 16'h1111);             chk("frozen write", regs_o[4], 16'h7000);
    ex(OP_CLRC);                           // frozen: carry stays 1
    ex(OP_FREEZENC);                       // pushes 0, still frozen
    ex(OP_UNFREEZE);
    ex(OP_LDALL, 4, 16'h2222);             chk("still frozen", regs_o[4], 16'h7000);
    ex(OP_UNFREEZE);
    ex(OP_LDALL, 4, 16'h3333);             chk("unfrozen", regs_o[4], 16'h3333);
    ex(OP_CLRC);
    ex(OP_FREEZEC);                        // C=0 -> not frozen
    ex(OP_LDALL, 4, 16'h4444);             chk("FREEZEC C=0", regs_o[4], 16'h4444);
    ex(OP_UNFREEZE);
    ex(OP_FREEZENC);                       // C=0 -> frozen
    ex(OP_LDALL, 4, 16'h4545);             chk("FREEZENC C=0", regs_o[4], 16'h4444);
    ex(OP_UNFREEZE);
    ex(OP_SETC);
    ex(OP_FREEZENC);                       // C=1 -> not frozen
    ex(OP_LDALL, 4, 16'h4646);             chk("FREEZENC C=1", regs_o[4], 16'h4646);
    ex(OP_UNFREEZE);
    ex(OP_CLRC);
    ex(OP_LDALL, 4, 16'h4444);
    // rotate and FREEZE on Z
    ex(OP_LDALL, 0, 16'h0001);
    ex(OP_RTR);                            chk("RTR", regs_o[0], 16'h0000);
    ex(OP_FREEZEZ);                        // Z=1 -> frozen
    ex(OP_LDALL, 4, 16'h5555);             chk("FREEZEZ", regs_o[4], 16'h4444);
    ex(OP_UNFREEZE);
    ex(OP_FREEZENZ);                       // Z=1 -> not frozen
    ex(OP_LDALL, 4, 16'h4747);             chk("FREEZENZ Z=1", regs_o[4], 16'h4747);
    ex(OP_UNFREEZE);
    ex(OP_LDALL, 4, 16'h4444);
    ex(OP_LDALL, 0, 16'h0001);             // ACC back to 0 with carry 1 for RTL
    ex(OP_RTR);
    ex(OP_RTL);                            chk("RTL carry in", regs_o[0], 16'h0001);
    // LFSR
    ex(OP_LDALL, 1, 16'hCAFE);
    ex(OP_LDALL, 0, 16'hBEEF);
    ex(OP_SEED);
    ex(OP_LLFSR);                          chk("LLFSR seed", regs_o[0], 16'hBEEF);
    ex(OP_RANDON);
    repeat (3) @(negedge clk);
    ex(OP_LLFSR);                          checks++; if (regs_o[0] == 16'hBEEF) begin failures++; $display("FAIL LFSR not running"); end
    ex(OP_RANDOFF);
    // memories: setup, local/global associative memories
    cfgw(CFG_SNBRAM, 0, 32'h0011_0022);
    cfgw(CFG_SNBRAM, 1, 32'h0033_0044);
    cfgw(CFG_LOCAL, 77, 32'd2);            // neuron 77 -> local synapse 1
    cfgw(CFG_GENC_ID, 4, 32'd3);
    cfgw(CFG_GENC_RC, 12, 32'd7);
    cfgw(CFG_GCONV_ID, 3, 32'h0000_0003);
    cfgw(CFG_GCONV_RC, 7, 32'h0000_0002);  // global synapse 1 -> index 101
    spk_clr = 1; @(negedge clk); spk_clr = 0; @(negedge clk);
    spike_in.valid = 1; spike_in.chip = 9; spike_in.lin = 77; @(negedge clk);
    spike_in.chip = 4; spike_in.lin = 12; @(negedge clk);
    spike_in = '0; repeat (4) @(negedge clk);
    ex(OP_LOADSN);                         chk("LOADSN R1", regs_o[1], 16'h0011); chk("LOADSN ACC", regs_o[0], 16'h0022);
    ex(OP_LDALL, 0, 16'hAB00); ex(OP_LDALL, 1, 16'h00CD);
    ex(OP_STORESP);                        // word0 <= 00CD_AB00, BP=1
    ex(OP_LOADSP);                         // word1, spike bit 1 (local)
    chk("LOADSP R1", regs_o[1], 16'h0033); chk("LOADSP ACC", regs_o[0], 16'h0045);
    for (int i = 0; i < 100; i++) ex(OP_STORESP);  // BP = 101
    ex(OP_LOADSP);                         chk("LOADSP global spike", regs_o[0][0], 1);
    ex(OP_READMP);                         chk("readback word BP", rb_bram[31:1], {regs_o[1], regs_o[0][15:1]});
    // STOREB
    ex(OP_LDALL, 0, 16'h0F0F);
    ex(OP_STOREB);                         chk("STOREB", ext_buffer, 16'h0F0F);
    // output spikes on layers 0 and 5
    ex(OP_LDALL, 0, 16'h0001);
    instr.virt = 0; ex(OP_STOREPS);
    instr.virt = 5; ex(OP_STOREPS);
    instr.virt = 0;
    chk("Si layers", si_o, 8'b0010_0001);
    dist_layer = 5; #1;
    chk("row_out", row_out, 1);
    chk("col_out disabled", col_out, 0);
    row_en = 1; #1 chk("col_out enabled", col_out, 1);
    col_in = 1; row_in = 0; dist_layer = 3; #1;
    chk("row_out chain", row_out, 0); chk("col_in pass", col_out, 1);
    col_in = 0; dist_layer = 5;
    row_sel = 1; col_sel = 1; @(negedge clk); row_sel = 0; col_sel = 0; row_en = 0;
    chk("spike reset", si_o, 8'b0000_0001);
    // spk_clr clears input spikes and BP
    spk_clr = 1; @(negedge clk); spk_clr = 0; @(negedge clk);
    ex(OP_LOADSP);                         chk("cleared spike", regs_o[0][0], 0);
    chk("BP cleared (word0)", regs_o[1], 16'h00CD);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
