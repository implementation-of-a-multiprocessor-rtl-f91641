// tb_mp_array: 3 x 4 array with 3 virtual layers in use. Random PEs are
// given output spikes in random layers through broadcast instructions;
// then the distribution phase is run and the spike addresses leaving
// the array are compared with the expected order (layer, then row, then
// column, lowest first). Also checks one spike per cycle within a row,
// exactly one empty cycle at each row switch, dist_done at the end, and
// that all output spikes were cleared.
module tb_mp_array;
  import heens_pkg::*;
  localparam int ROWS = 3, COLS = 4;
  logic clk = 0, rst_n = 0;
  pe_instr_t instr;
  cfg_t cfg;
  spike_t spike_in, spike_out;
  logic [6:0] own_chip = 2;
  logic [2:0] n_layers = 2, spike_layer;
  logic en_spike, spk_clr, dist_done;
  logic [4:0] spike_row, spike_col;
  logic [31:0] rb_bram;
  logic [15:0] rb_buf;
  int checks = 0, failures = 0, row_switches = 0, gaps = 0;
  bit pat [3][ROWS][COLS];
  int exp_q [$];

  mp_array #(.ROWS(ROWS), .COLS(COLS)) dut (.*);
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

  task automatic ex(input opcode_e op, input int operand, input logic [15:0] data,
                    input bit all, input int r, input int c, input int v);
    instr.op = op; instr.operand = 10'(operand); instr.data = data;
    instr.sel_all = all; instr.sel_row = 5'(r); instr.sel_col = 5'(c); instr.virt = 3'(v);
    @(negedge clk);
    instr.op = OP_NOP;
  endtask

  initial begin
    int prev_row, last_cycle, cyc, got;
    instr = '0; cfg = '0; spike_in = '0; en_spike = 0; spk_clr = 0;
    @(negedge clk); rst_n = 1; @(negedge clk);
    for (int round = 0; round < 4; round++) begin
      // program a random spike pattern
      for (int v = 0; v < 3; v++)
        for (int r = 0; r < ROWS; r++)
          for (int c = 0; c < COLS; c++) begin
            pat[v][r][c] = ($urandom_range(0, 2) == 0);
            if (round == 0 && v == 0 && r == 0) pat[v][r][c] = 1;   // full row
            ex(OP_LDALL, 0, 16'(pat[v][r][c]), 0, r, c, v);
            ex(OP_STOREPS, 0, 0, 0, r, c, v);
          end
      exp_q.delete();
      for (int v = 0; v < 3; v++)
        for (int r = 0; r < ROWS; r++)
          for (int c = 0; c < COLS; c++)
            if (pat[v][r][c]) exp_q.push_back((v << 16) | (r << 8) | c);
      repeat (3) @(negedge clk);
      en_spike = 1;
      prev_row = -1; last_cycle = -1; cyc = 0;
      while (!dist_done && cyc < 500) begin
        @(negedge clk); cyc++;
        if (spike_out.valid) begin
          got = (int'(spike_layer) << 16) | (int'(spike_row) << 8) | int'(spike_col);
          checks++;
          if (exp_q.size() == 0 || exp_q[0] != got) begin
            failures++; $display("FAIL order got=%h exp=%h", got, exp_q.size() ? exp_q[0] : -1);
          end else void'(exp_q.pop_front());
          chk("linear address", 32'(spike_out.lin), 32'((spike_layer * ROWS + spike_row) * COLS + spike_col));
          chk("chip id", 32'(spike_out.chip), 2);
          if ((got >> 8) == prev_row) chk("back-to-back within row", cyc - last_cycle, 1);
          else if (prev_row != -1) begin
            row_switches++;
            if (cyc - last_cycle > 1) gaps++;
          end
          prev_row = got >> 8; last_cycle = cyc;
        end
      end
      repeat (2) @(negedge clk);
      chk("all spikes out", exp_q.size(), 0);
      chk("dist_done", dist_done, 1);
      en_spike = 0; repeat (2) @(negedge clk);   // en_spike is registered on entry
      chk("dist_done drops", dist_done, 0);
    end
    checks++;
    if (row_switches == 0 || gaps != row_switches) begin
      failures++; $display("FAIL row switches=%0d gaps=%0d", row_switches, gaps);
    end
    $display("row switches=%0d (each with an empty cycle: %0d)", row_switches, gaps);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
