// tb_all_to_one: the "all spiking to one" network on a 4 x 4 array.
//
// Every one of the 15 other neurons projects onto the neuron in row 0,
// column 0, which runs the same leaky integrate-and-fire program as the
// rest of the array (one virtual layer, NSYN synapse words per neuron,
// membrane potential in word NSYN). The 15 source neurons are kept active
// by a synapse onto themselves and start from a potential that makes them
// all fire in the first step; the odd-numbered ones have a self weight
// above threshold and keep firing every step, the even-numbered ones fall
// silent. Weights and potentials are random within those ranges. A reference model predicts the spikes of every step and the
// spike addresses leaving the chip are compared with it in order. The
// test fails if the target neuron never fires. The top runs with its
// default synapse counts and memory sizes; only the array is reduced to
// the 4 x 4 of the example network.
module tb_all_to_one;
  import heens_pkg::*;
  localparam int ROWS = 4, COLS = 4, STEPS = 24;
  localparam int NSYN = 16, NN = ROWS * COLS;
  localparam logic [15:0] THETA = 16'd1000, KDEC = 16'h6000;
  localparam logic [6:0] OWN = 7'd1;

  logic clk = 0, rst_n = 0;
  logic [2:0] n_layers = 3'd0;
  logic imem_we, dmem_we, start, sel_all, busy, int_o, int_ack, aer_in_ready, eo_exec, cam_en;
  logic [9:0] imem_addr;
  iword_t imem_data;
  logic [6:0] dmem_addr;
  logic [31:0] dmem_data, dmem_q;
  cfg_t cfg;
  logic [4:0] sel_row, sel_col, aer_out_row, aer_out_col;
  logic [15:0] ext_buffer;
  spike_t aer_out, aer_in;
  logic [2:0] aer_out_layer;

  heens_top #(.ROWS(ROWS), .COLS(COLS)) dut (.own_chip(OWN), .*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int n_spikes = 0, n_target = 0, n_gap = 0, n_local = 0;

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input string w, input logic [31:0] g, input logic [31:0] e);
    checks++;
    if (g !== e) begin failures++; $display("FAIL %s got=%h exp=%h", w, g, e); end
  endtask

  // ---------------- network and reference model ----------------
  logic signed [15:0] w   [NN][NSYN];
  int                 src [NN][NSYN];     // source neuron, -1 = unused synapse
  logic signed [15:0] v   [NN];
  bit                 out_now [NN];
  bit                 in_loc  [NN];

  function automatic logic signed [15:0] sat16(input int x);
    if (x > 32767) return 16'sh7FFF;
    if (x < -32768) return -16'sh8000;
    return 16'(x);
  endfunction

  task automatic model_step();
    for (int n = 0; n < NN; n++) begin
      logic signed [15:0] sum, vd;
      logic signed [31:0] p;
      sum = 0;
      for (int k = 0; k < NSYN; k++)
        if (src[n][k] >= 0 && in_loc[src[n][k]]) begin
          sum = sat16(int'(sum) + int'(w[n][k]));
          n_local++;
        end
      p  = v[n] * $signed(KDEC);
      vd = sat16(int'(p[31:16]) + int'(sum));
      out_now[n] = vd >= $signed(THETA);
      v[n] = out_now[n] ? 16'sd0 : vd;
    end
  endtask

  // ---------------- program ----------------
  task automatic ld(input int a, input opcode_e op, input int operand);
    imem_we = 1; imem_addr = 10'(a); imem_data = {op, 10'(operand)};
    @(negedge clk); imem_we = 0;
  endtask

  task automatic load_program();
    ld(0, OP_HALT, 0);
    ld(1, OP_READMP, 10 << 3);
    ld(2, OP_LDALL, (1 << 3) | 4);     // R4 = theta
    ld(3, OP_LDALL, (2 << 3) | 5);     // R5 = decay factor
    ld(4, OP_RST, 2);                  // R2 = weighted sum
    ld(5, OP_LOOP, NSYN);
    ld(6, OP_GOSUB, 30);
    ld(7, OP_ENDL, 0);
    ld(8, OP_LOADSN, 0);               // ACC = V
    ld(9, OP_MULS, 5);                 // ACC = V*K (high word)
    ld(10, OP_ADD, 2);
    ld(11, OP_MOVR, 3);                // R3 = new V
    ld(12, OP_SUB, 4);
    ld(13, OP_RTL, 0);                 // C = (V < theta)
    ld(14, OP_RST, 7);
    ld(15, OP_FREEZEC, 0);
    ld(16, OP_SET, 7);                 // fire
    ld(17, OP_RST, 3);                 // reset potential
    ld(18, OP_UNFREEZE, 0);
    ld(19, OP_MOVA, 3);
    ld(20, OP_STORESP, 0);             // save V, BP -> next layer
    ld(21, OP_MOVA, 7);
    ld(22, OP_STOREPS, 0);
    ld(23, OP_SPKDIS, 0);
    ld(24, OP_GOTO, 2);
    ld(30, OP_LOADSP, 0);              // R1 = weight, ACC(0) = input spike
    ld(31, OP_RTR, 0);
    ld(32, OP_FREEZENC, 0);
    ld(33, OP_MOVA, 1);
    ld(34, OP_ADD, 2);
    ld(35, OP_MOVR, 2);
    ld(36, OP_UNFREEZE, 0);
    ld(37, OP_RST, 0);
    ld(38, OP_STORESP, 0);
    ld(39, OP_RET, 0);
  endtask

  task automatic cfgw(input int r, input int c, input cfg_mem_e mm, input int a, input logic [31:0] d);
    cfg.we = 1; cfg.row = 5'(r); cfg.col = 5'(c); cfg.mem = mm; cfg.addr = 11'(a); cfg.data = d;
    @(negedge clk);
    cfg.we = 0;
  endtask

  // target (neuron 0): synapse k-1 from neuron k, k = 1..15; every other
  // neuron n: synapse 0 from itself
  task automatic configure();
    for (int n = 0; n < NN; n++) begin
      int r, c;
      r = n / COLS; c = n % COLS;
      for (int k = 0; k < NSYN; k++) begin src[n][k] = -1; w[n][k] = 0; end
      if (n == 0) begin
        for (int k = 0; k < NN - 1; k++) begin
          src[0][k] = k + 1;
          w[0][k] = 16'($urandom_range(100, 250));
        end
        v[0] = 0;
      end else begin
        src[n][0] = n;
        // odd neurons re-excite themselves above threshold, even ones do not
        w[n][0] = (n % 2) ? 16'($urandom_range(1100, 1500)) : 16'($urandom_range(300, 900));
        v[n] = 16'($urandom_range(2700, 4000));
      end
      for (int k = 0; k < NSYN; k++) cfgw(r, c, CFG_SNBRAM, k, {w[n][k], 16'h0});
      cfgw(r, c, CFG_SNBRAM, NSYN, {16'h0, v[n]});
      for (int s = 0; s < NN; s++) begin
        int e;
        e = 0;
        for (int k = 0; k < NSYN; k++) if (src[n][k] == s) e = k + 1;
        cfgw(r, c, CFG_LOCAL, s, 32'(e));
      end
    end
  endtask

  // ---------------- monitor ----------------
  int exp_q [$];
  int last_row = -1, last_cyc = 0, cyc = 0;
  always @(posedge clk) if (rst_n) begin
    cyc++;
    if (aer_out.valid) begin
      int got;
      got = int'(aer_out_row) * COLS + int'(aer_out_col);
      n_spikes++;
      if (got == 0) n_target++;
      checks++;
      if (exp_q.size() == 0 || exp_q[0] != got) begin
        failures++;
        $display("FAIL spike order: got %0d expected %0d", got, exp_q.size() != 0 ? exp_q[0] : -1);
      end else void'(exp_q.pop_front());
      if (last_row != -1 && int'(aer_out_row) != last_row && cyc - last_cyc > 1) n_gap++;
      last_row = int'(aer_out_row);
      last_cyc = cyc;
    end
  end

  initial begin
    imem_we = 0; dmem_we = 0; start = 0; sel_all = 1; sel_row = 0; sel_col = 0;
    int_ack = 0; cam_en = 0; aer_in = '0; cfg = '0; imem_addr = 0; imem_data = '0;
    dmem_addr = 0; dmem_data = 0;
    for (int n = 0; n < NN; n++) in_loc[n] = 0;
    repeat (2) @(negedge clk); rst_n = 1; @(negedge clk);
    load_program();
    dmem_we = 1;
    dmem_addr = 1; dmem_data = 32'(THETA); @(negedge clk);
    dmem_addr = 2; dmem_data = 32'(KDEC);  @(negedge clk);
    dmem_we = 0;
    configure();
    start = 1; @(negedge clk); start = 0;
    wait (int_o);
    repeat (3) @(negedge clk);
    int_ack = 1; @(negedge clk); int_ack = 0;
    for (int t = 0; t < STEPS; t++) begin
      model_step();
      exp_q.delete();
      for (int n = 0; n < NN; n++) if (out_now[n]) exp_q.push_back(n);
      @(posedge clk iff eo_exec);
      cam_en = 1;
      repeat (2) @(negedge clk);
      @(negedge clk iff !dut.u_seq.en_spike);
      chk("all predicted spikes sent", exp_q.size(), 0);
      cam_en = 0;
      for (int n = 0; n < NN; n++) in_loc[n] = out_now[n];
    end
    $display("spikes=%0d target_spikes=%0d rowgap=%0d local=%0d", n_spikes, n_target, n_gap, n_local);
    if (n_target == 0) begin failures++; $display("FAIL target neuron never fired"); end
    if (n_gap == 0)    begin failures++; $display("FAIL no row-switch gap"); end
    checks += 2;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
