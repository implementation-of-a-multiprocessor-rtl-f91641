// tb_sequencer: loads a short program exercising LDALL, LOOP/ENDL,
// GOSUB/RET, MUL (two-cycle hold), HALT/int_ack, READMP, SPKDIS with two
// virtual layers, the distribution handshake (en_spike, spk_clr,
// dist_done, cam_en) and GOTO. The broadcast opcode stream is compared
// with the sequence expected from the program, cycle by cycle for MUL.
module tb_sequencer;
  import heens_pkg::*;
  logic clk = 0, rst_n = 0;
  logic imem_we, dmem_we, start, sel_all, en_spike, spk_clr, dist_done;
  logic [9:0] imem_addr, pc_o;
  iword_t imem_data;
  logic [6:0] dmem_addr;
  logic [31:0] dmem_data, dmem_q, rb_data;
  logic [4:0] sel_row, sel_col;
  logic [2:0] n_layers;
  pe_instr_t instr;
  logic eo_exec, cam_en, int_o, int_ack, busy;
  int checks = 0, failures = 0;
  opcode_e got [$];
  opcode_e exp [$];
  int virt_at_spkdis [$];
  int clr_pulses = 0, dist_cycles = 0;

  sequencer dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input string w, input logic [31:0] g, input logic [31:0] e);
    checks++;
    if (g !== e) begin failures++; $display("FAIL %s got=%h exp=%h", w, g, e); end
  endtask

  task automatic ld(input int a, input opcode_e op, input int operand);
    imem_we = 1; imem_addr = 10'(a); imem_data = {op, 10'(operand)};
    @(negedge clk); imem_we = 0;
  endtask

  // monitor of the broadcast bus
  always @(posedge clk) if (rst_n) begin
    if (instr.op != OP_NOP) got.push_back(instr.op);
    if (instr.op == OP_LDALL) chk("LDALL data", instr.data, 16'hBEEF);
    if (instr.op == OP_SPKDIS) virt_at_spkdis.push_back(int'(instr.virt));
    if (spk_clr) clr_pulses++;
    if (en_spike) dist_cycles++;
  end

  initial begin
    imem_we = 0; dmem_we = 0; start = 0; sel_all = 1; sel_row = 0; sel_col = 0;
    n_layers = 1; dist_done = 0; rb_data = 32'hABCD_1234; cam_en = 1; int_ack = 0;
    imem_addr = 0; imem_data = '0; dmem_addr = 0; dmem_data = 0;
    @(negedge clk); rst_n = 1;
    dmem_we = 1; dmem_addr = 1; dmem_data = 32'h0000_BEEF; @(negedge clk); dmem_we = 0;
    ld(0, OP_LDALL, (1 << 3) | 4);
    ld(1, OP_LOOP, 3);
    ld(2, OP_GOSUB, 10);
    ld(3, OP_ENDL, 0);
    ld(4, OP_MUL, 2);
    ld(5, OP_HALT, 0);
    ld(6, OP_READMP, 5 << 3);
    ld(7, OP_SPKDIS, 0);
    ld(8, OP_GOTO, 0);
    ld(10, OP_INC, 0);
    ld(11, OP_RET, 0);
    start = 1; @(negedge clk); start = 0;
    wait (int_o);
    repeat (3) @(negedge clk);
    chk("halted", int_o, 1);
    int_ack = 1; @(negedge clk); int_ack = 0;
    wait (en_spike);
    repeat (6) @(negedge clk);
    chk("waits for dist_done", en_spike, 1);
    dist_done = 1; @(negedge clk); dist_done = 0;
    chk("en_spike released", en_spike, 0);
    repeat (4) @(negedge clk);
    chk("waits for cam_en low", dut.state == dut.S_WAITCAM, 1);
    cam_en = 0;
    repeat (3) @(negedge clk);
    dmem_addr = 5; #1;
    chk("READMP stored read-back", dmem_q, 32'hABCD_1234);
    // expected stream: two passes (virt 0 and 1), then the start of the third
    for (int pass = 0; pass < 2; pass++) begin
      exp.push_back(OP_LDALL); exp.push_back(OP_LOOP);
      repeat (3) begin exp.push_back(OP_GOSUB); exp.push_back(OP_INC); exp.push_back(OP_RET); exp.push_back(OP_ENDL); end
      exp.push_back(OP_MUL); exp.push_back(OP_MUL);
      exp.push_back(OP_HALT); exp.push_back(OP_READMP); exp.push_back(OP_SPKDIS); exp.push_back(OP_GOTO);
    end
    for (int i = 0; i < exp.size(); i++) begin
      checks++;
      if (i >= got.size() || got[i] != exp[i]) begin
        failures++;
        $display("FAIL stream[%0d] got=%s exp=%s", i, i < got.size() ? got[i].name() : "none", exp[i].name());
      end
    end
    chk("virt of first SPKDIS", virt_at_spkdis[0], 0);
    chk("virt of second SPKDIS", virt_at_spkdis[1], 1);
    chk("one spk_clr pulse", clr_pulses, 1);
    chk("distribution phase length", dist_cycles, 6);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // second HALT of the second pass
  initial begin
    wait (rst_n); @(negedge clk);
    wait (int_o); wait (!int_o);
    wait (int_o);
    repeat (2) @(negedge clk);
    int_ack = 1; @(negedge clk); int_ack = 0;
  end
endmodule
