// mp_array: the ROWS x COLS multiprocessor array and its spike read-out.
//
// Rows are stacked with the column spike chains running from row 0 up to
// the last row, whose col_out is the column bus. After each execution
// pass the sequencer raises en_spike and the array empties the output
// spike bits of every PE, layer by layer, one spike per cycle:
//  * row priority: the enabled row is the lowest-numbered row that still
//    holds spikes; this choice passes through a register, so switching to
//    a new row costs one empty cycle (spike_valid low);
//  * column priority: within the enabled row the lowest-numbered column
//    with a spike is selected, its address is sent out and the PE clears
//    the spike at the next edge;
//  * when no row holds a spike of the current layer the next layer is
//    taken, and after layer n_layers dist_done is raised.
// The row-priority register and the lowest-index-first order follow the
// document; en_spike and spk_clr are registered once on entry, matching
// the one-cycle input register each row applies to the instruction bus.
// spike_out is registered: address of a spike appears one cycle after the
// PE was selected.
// Lint note: the assertion below uses rst_n in its disable condition,
// which the linter reports as a synchronous use of the reset; the
// flip-flops use it only asynchronously.
module mp_array
  import heens_pkg::*;
#(
  parameter int unsigned ROWS        = 12,
  parameter int unsigned COLS        = 12,
  parameter int unsigned VIRT_LAYERS = 8,
  parameter int unsigned LOCAL_SYN   = 100,
  parameter int unsigned GLOBAL_SYN  = 32,
  parameter int unsigned BRAM_DEPTH  = 1024
) (
  input  logic                clk,
  input  logic                rst_n,
  input  pe_instr_t           instr,
  input  cfg_t                cfg,
  input  spike_t              spike_in,
  input  logic [CHIP_W-1:0]   own_chip,
  input  logic [VIRT_W-1:0]   n_layers,   // virtual layers in use minus one
  input  logic                en_spike,   // distribution phase
  input  logic                spk_clr,    // clear input spike registers
  output logic                dist_done,
  output spike_t              spike_out,
  output logic [VIRT_W-1:0]   spike_layer,
  output logic [RC_W-1:0]     spike_row,
  output logic [RC_W-1:0]     spike_col,
  output logic [BRAM_DW-1:0]  rb_bram,
  output logic [DW-1:0]       rb_buf
);

  logic [COLS-1:0]     col_chain [ROWS+1];
  logic [ROWS-1:0]     row_any, row_en;
  logic [COLS-1:0]     col_sel;
  logic [BRAM_DW-1:0]  row_rb  [ROWS];
  logic [DW-1:0]       row_buf [ROWS];
  logic                en_q;
  logic [VIRT_W-1:0]   layer;
  logic [RC_W-1:0]     row_idx, col_idx;
  logic                col_hit;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      en_q <= 1'b0;
    end else begin
      en_q <= en_spike;
    end
  end

  assign col_chain[0] = '0;

  for (genvar r = 0; r < ROWS; r++) begin : g_row
    mp_row #(
      .ROW(r), .COLS(COLS), .VIRT_LAYERS(VIRT_LAYERS), .LOCAL_SYN(LOCAL_SYN),
      .GLOBAL_SYN(GLOBAL_SYN), .BRAM_DEPTH(BRAM_DEPTH)
    ) u_row (
      .clk, .rst_n, .instr_i(instr), .cfg_i(cfg), .spike_i(spike_in), .spk_clr_i(spk_clr),
      .own_chip, .dist_layer(layer), .col_in(col_chain[r]), .col_out(col_chain[r+1]),
      .row_any(row_any[r]), .row_en(row_en[r]), .col_sel,
      .rb_bram(row_rb[r]), .rb_buf(row_buf[r])
    );
  end

  // Row priority through a register: one empty cycle at every row switch.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) row_en <= '0;
    else if (!en_q) row_en <= '0;
    else row_en <= row_any & ~(row_any - 1'b1);   // lowest set bit
  end

  // Column priority, combinational within the enabled row.
  assign col_sel = en_q ? (col_chain[ROWS] & ~(col_chain[ROWS] - 1'b1)) : '0;
  assign col_hit = |col_sel;

  always_comb begin
    row_idx = '0;
    col_idx = '0;
    for (int r = 0; r < ROWS; r++) if (row_en[r])  row_idx = RC_W'(r);
    for (int c = 0; c < COLS; c++) if (col_sel[c]) col_idx = RC_W'(c);
  end

  // Layer sequencing and completion.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      layer     <= '0;
      dist_done <= 1'b0;
    end else if (!en_q) begin
      layer     <= '0;
      dist_done <= 1'b0;
    end else if (!dist_done && row_any == '0) begin
      if (layer == n_layers) dist_done <= 1'b1;
      else                   layer <= layer + 1'b1;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      spike_out   <= '0;
      spike_layer <= '0;
      spike_row   <= '0;
      spike_col   <= '0;
    end else begin
      spike_out.valid <= col_hit;
      spike_out.chip  <= own_chip;
      spike_out.lin   <= spike_lin(layer, row_idx, col_idx, ROWS, COLS);
      spike_layer     <= layer;
      spike_row       <= row_idx;
      spike_col       <= col_idx;
    end
  end

  always_comb begin
    rb_bram = '0;
    rb_buf  = '0;
    for (int r = 0; r < ROWS; r++) begin
      rb_bram |= row_rb[r];
      rb_buf  |= row_buf[r];
    end
  end

  // A spike can only be read out of the enabled row.
  assert property (@(posedge clk) disable iff (!rst_n) col_hit |-> $onehot(row_en));

endmodule
