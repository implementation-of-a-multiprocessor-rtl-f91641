// tb_heens_full: the end-to-end integrate-and-fire run of tb_heens_top on
// the core at its default size (12 x 12 PEs, 100 local synapses, all
// parameters at their defaults), for three emulation steps. With 100
// local synapses every synapse of this program is local, so the remote
// spikes sent into the ring input match no synapse here.
//
// Description of the shared program and model:
//
// Every neuron (ROWS x COLS PEs, two virtual layers) has four synapses
// whose weights sit in the upper half of memory words BP = 5*layer + k
// and whose membrane potential V sits in the lower half of word
// 5*layer + 4. Per pass and layer the program sums the weights of the
// synapses whose input spike is set (LOOP/GOSUB, LOADSP, freeze on no
// spike), decays V with MULS, adds the sum, compares with the threshold
// and on firing sets the output spike and resets V (freeze on C).
// Synapses are fed by spikes of neurons on this chip (looped back through
// the local associative memory) and, for synapse 3 of layer 1 when it is
// beyond the local range, by spikes of a remote chip sent into the ring
// input (global associative memory). A reference model in this file
// predicts the spikes of every step; the spike addresses leaving the chip
// are compared with it in order. The program starts with HALT and READMP.
// Mechanisms counted: two-cycle MUL, freeze, row-switch gap, virtual
// layer pass without distribution, local loopback, remote spike,
// ring-input back-pressure, HALT and READMP.
module tb_heens_full;
  import heens_pkg::*;
  localparam int ROWS = 12, COLS = 12, LOCAL_SYN = 100, STEPS = 3;
  localparam int NL = 2, NSYN = 4, NN = NL * ROWS * COLS, NREM = 8;
  localparam logic [15:0] THETA = 16'd1000, KDEC = 16'h6000;
  localparam logic [6:0] OWN = 7'd3, REMOTE = 7'd5;

  logic clk = 0, rst_n = 0;
  logic [2:0] n_layers = 3'(NL - 1);
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

  heens_top dut (.own_chip(OWN), .*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int n_mul2 = 0, n_frozen = 0, n_gap = 0, n_layerpass = 0, n_dist = 0, n_local = 0,
      n_global = 0, n_backpressure = 0, n_halt = 0, n_readmp = 0, n_spikes = 0;

  initial begin
    repeat (2000000) @(posedge clk);
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
  int                 src [NN][NSYN];     // local source lin, or remote lin for a global synapse
  bit                 glob[NN][NSYN];
  logic signed [15:0] v   [NN];
  bit                 out_now [NN];
  bit                 in_loc  [NN];       // previous step's spikes on this chip
  bit                 in_rem  [NREM];     // previous step's remote spikes
  bit                 rem_now [NREM];

  function automatic logic signed [15:0] sat16(input int x);
    if (x > 32767) return 16'sh7FFF;
    if (x < -32768) return -16'sh8000;
    return 16'(x);
  endfunction

  function automatic int lin_of(int l, int r, int c);
    return (l * ROWS + r) * COLS + c;
  endfunction

  task automatic model_step();
    for (int n = 0; n < NN; n++) begin
      logic signed [15:0] sum, vd;
      logic signed [31:0] p;
      sum = 0;
      for (int k = 0; k < NSYN; k++)
        if (glob[n][k] ? in_rem[src[n][k]] : in_loc[src[n][k]]) begin
          sum = sat16(int'(sum) + int'(w[n][k]));
          if (glob[n][k]) n_global++; else n_local++;
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

  task automatic configure();
    for (int r = 0; r < ROWS; r++)
      for (int c = 0; c < COLS; c++) begin
        int ltab [NN];
        for (int s = 0; s < NN; s++) ltab[s] = 0;
        for (int l = 0; l < NL; l++) begin
          int n = lin_of(l, r, c);
          for (int k = 0; k < NSYN; k++) begin
            int idx = 5 * l + k;
            glob[n][k] = idx >= LOCAL_SYN;
            w[n][k] = 16'($urandom_range(250, 700));
            if (glob[n][k]) begin
              src[n][k] = $urandom_range(0, NREM - 1);
              cfgw(r, c, CFG_GENC_RC, src[n][k], 2);             // matching remote neuron
            end else begin
              int s;
              do s = $urandom_range(0, NN - 1); while (ltab[s] != 0);
              ltab[s] = idx + 1;
              src[n][k] = s;
            end
            cfgw(r, c, CFG_SNBRAM, idx, {w[n][k], 16'h0});
          end
          v[n] = 16'($urandom_range(0, 4000));
          cfgw(r, c, CFG_SNBRAM, 5 * l + 4, {16'h0, v[n]});
        end
        for (int s = 0; s < NN; s++) cfgw(r, c, CFG_LOCAL, s, ltab[s]);
        for (int s = 0; s < NREM; s++) begin
          bit used = 0;
          for (int l = 0; l < NL; l++)
            for (int k = 0; k < NSYN; k++)
              if (glob[lin_of(l, r, c)][k] && src[lin_of(l, r, c)][k] == s) used = 1;
          if (!used) cfgw(r, c, CFG_GENC_RC, s, 0);
        end
        cfgw(r, c, CFG_GENC_ID, REMOTE, 1);
        cfgw(r, c, CFG_GCONV_ID, 1, 32'h1);
        cfgw(r, c, CFG_GCONV_RC, 2, 32'h1);
        cfgw(r, c, CFG_GCONV_RC, 0, 32'h0);
      end
  endtask

  // ---------------- monitors ----------------
  int exp_q [$];
  int last_row = -1, last_cyc = 0, cyc = 0, eo_count = 0;
  always @(posedge clk) if (rst_n) begin
    cyc++;
    if (dut.u_seq.state == dut.u_seq.S_MUL2) n_mul2++;
    if (!dut.u_array.g_row[0].u_row.g_pe[0].u_pe.no_freeze) n_frozen++;
    if (aer_in.valid && !aer_in_ready) n_backpressure++;
    if (aer_out.valid) begin
      int got;
      got = lin_of(aer_out_layer, aer_out_row, aer_out_col);
      n_spikes++;
      checks++;
      if (exp_q.size() == 0 || exp_q[0] != got) begin
        failures++;
        $display("FAIL spike order: got lin %0d expected %0d", got, exp_q.size() != 0 ? exp_q[0] : -1);
      end else void'(exp_q.pop_front());
      if (last_row != -1 && (aer_out_layer * ROWS + aer_out_row) != last_row && cyc - last_cyc > 1) n_gap++;
      last_row = aer_out_layer * ROWS + aer_out_row;
      last_cyc = cyc;
    end
  end

  initial begin
    imem_we = 0; dmem_we = 0; start = 0; sel_all = 1; sel_row = 1; sel_col = 2 % COLS;
    int_ack = 0; cam_en = 0; aer_in = '0; cfg = '0; imem_addr = 0; imem_data = '0;
    dmem_addr = 0; dmem_data = 0;
    for (int n = 0; n < NN; n++) in_loc[n] = 0;
    for (int s = 0; s < NREM; s++) in_rem[s] = 0;
    repeat (2) @(negedge clk); rst_n = 1; @(negedge clk);
    load_program();
    dmem_we = 1;
    dmem_addr = 1; dmem_data = 32'(THETA); @(negedge clk);
    dmem_addr = 2; dmem_data = 32'(KDEC);  @(negedge clk);
    dmem_we = 0;
    configure();
    start = 1; @(negedge clk); start = 0;
    // HALT, then READMP of PE (1, 2 mod COLS), word 0
    wait (int_o); n_halt++;
    repeat (3) @(negedge clk);
    int_ack = 1; @(negedge clk); int_ack = 0;
    for (int t = 0; t < STEPS; t++) begin
      model_step();
      exp_q.delete();
      for (int n = 0; n < NN; n++) if (out_now[n]) exp_q.push_back(n);
      // one eo_exec per layer; the last one starts distribution
      for (int l = 0; l < NL; l++) begin
        @(posedge clk iff eo_exec);
        if (l < NL - 1) n_layerpass++;
      end
      cam_en = 1;
      repeat (2) @(negedge clk);
      for (int s = 0; s < NREM; s++) begin
        rem_now[s] = $urandom_range(0, 1);
        if (rem_now[s]) begin
          aer_in.valid = 1; aer_in.chip = REMOTE; aer_in.lin = 11'(s);
          @(negedge clk iff aer_in_ready);
          aer_in = '0;
        end
      end
      @(negedge clk iff !dut.u_seq.en_spike);
      n_dist++;
      chk("all predicted spikes sent", exp_q.size(), 0);
      cam_en = 0;
      for (int n = 0; n < NN; n++) in_loc[n] = out_now[n];
      for (int s = 0; s < NREM; s++) in_rem[s] = rem_now[s];
      if (t == 0) begin
        dmem_addr = 10; #1;
        chk("READMP word", dmem_q, {w[lin_of(0, 1, 2 % COLS)][0], 16'h0});
        n_readmp++;
      end
    end
    $display("spikes=%0d mul2=%0d frozen=%0d rowgap=%0d layerpass=%0d dist=%0d local=%0d global=%0d backpressure=%0d halt=%0d readmp=%0d",
             n_spikes, n_mul2, n_frozen, n_gap, n_layerpass, n_dist, n_local, n_global, n_backpressure, n_halt, n_readmp);
    if (n_spikes == 0)       begin failures++; $display("FAIL no spikes"); end
    if (n_mul2 == 0)         begin failures++; $display("FAIL no MUL stall"); end
    if (n_frozen == 0)       begin failures++; $display("FAIL no freeze"); end
    if (n_gap == 0)          begin failures++; $display("FAIL no row-switch gap"); end
    if (n_layerpass == 0)    begin failures++; $display("FAIL no virtual layer pass"); end
    if (n_local == 0)        begin failures++; $display("FAIL no local spike used"); end
    if (n_global == 0 && LOCAL_SYN < 5 * NL) begin failures++; $display("FAIL no remote spike used"); end
    if (n_backpressure == 0) begin failures++; $display("FAIL no ring back-pressure"); end
    checks += 8;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
