// mp_row: one row of processing elements.
//
// The row registers everything it receives from the sequencer side (the
// broadcast instruction, the setup bus, the incoming spike event and the
// spike-register clear) once before handing it to its COLS processing
// elements; every row has the same register, so all PEs of the array run
// in lock step one cycle behind the array inputs. The distribution
// signals are not registered here: the row ORs its PEs' pending spikes
// into row_any (the Row IN -> Row OUT chain), passes the column spike
// chain col_in -> col_out of each column through its PE, and hands the
// array's row/column selection to the PEs so that the selected PE clears
// its spike. The read-back words of the PE addressed by sel_row/sel_col
// are ORed onto rb_bram/rb_buf.
// Lint note: the PEs' regs_o and si_o debug outputs are left unconnected
// on purpose.
module mp_row
  import heens_pkg::*;
#(
  parameter int unsigned ROW         = 0,
  parameter int unsigned COLS        = 12,
  parameter int unsigned VIRT_LAYERS = 8,
  parameter int unsigned LOCAL_SYN   = 100,
  parameter int unsigned GLOBAL_SYN  = 32,
  parameter int unsigned BRAM_DEPTH  = 1024
) (
  input  logic                clk,
  input  logic                rst_n,
  input  pe_instr_t           instr_i,
  input  cfg_t                cfg_i,
  input  spike_t              spike_i,
  input  logic                spk_clr_i,
  input  logic [CHIP_W-1:0]   own_chip,
  input  logic [VIRT_W-1:0]   dist_layer,
  input  logic [COLS-1:0]     col_in,
  output logic [COLS-1:0]     col_out,
  output logic                row_any,
  input  logic                row_en,    // this row may put spikes on the column bus
  input  logic [COLS-1:0]     col_sel,   // one-hot column being read out
  output logic [BRAM_DW-1:0]  rb_bram,
  output logic [DW-1:0]       rb_buf
);

  pe_instr_t  instr_q;
  cfg_t       cfg_q;
  spike_t     spike_q;
  logic       clr_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      instr_q <= '0;
      cfg_q   <= '0;
      spike_q <= '0;
      clr_q   <= 1'b0;
    end else begin
      instr_q <= instr_i;
      cfg_q   <= cfg_i;
      spike_q <= spike_i;
      clr_q   <= spk_clr_i;
    end
  end

  logic [COLS:0]        chain;
  logic [COLS-1:0]      sel;
  logic [BRAM_DW-1:0]   pe_rb  [COLS];
  logic [DW-1:0]        pe_buf [COLS];

  assign chain[0] = 1'b0;

  for (genvar c = 0; c < COLS; c++) begin : g_pe
    processing_element #(
      .ROW(ROW), .COL(c), .VIRT_LAYERS(VIRT_LAYERS), .LOCAL_SYN(LOCAL_SYN),
      .GLOBAL_SYN(GLOBAL_SYN), .BRAM_DEPTH(BRAM_DEPTH)
    ) u_pe (
      .clk, .rst_n, .instr(instr_q), .cfg(cfg_q), .spike_in(spike_q), .own_chip,
      .spk_clr(clr_q), .dist_layer,
      .row_in(chain[c]), .row_out(chain[c+1]),
      .col_in(col_in[c]), .col_out(col_out[c]),
      .row_en, .row_sel(row_en), .col_sel(col_sel[c]),
      .selected(sel[c]), .rb_bram(pe_rb[c]), .ext_buffer(pe_buf[c]),
      .regs_o(), .si_o()
    );
  end

  assign row_any = chain[COLS];

  always_comb begin
    rb_bram = '0;
    rb_buf  = '0;
    for (int c = 0; c < COLS; c++) begin
      if (sel[c]) begin
        rb_bram |= pe_rb[c];
        rb_buf  |= pe_buf[c];
      end
    end
  end

endmodule
