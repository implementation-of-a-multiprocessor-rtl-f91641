// heens_top: spiking-neural-network emulator core for one FPGA of the ring.
//
// The sequencer fetches the neural program and broadcasts one instruction
// per cycle to a ROWS x COLS array of processing elements, each emulating
// up to VIRT_LAYERS neurons. After the last virtual layer of a pass the
// array's output spikes are read out one per cycle (mp_array) and sent
// both to the ring interface (aer_out) and straight back into the
// associative memories of all PEs on this chip. Spikes from other chips
// enter through aer_in, which is taken only in cycles without a local
// spike (aer_in_ready). The ring interface itself, the clock generation
// and the host are outside this module: their signals are ports.
//
// Host setup: load the instruction and data memories (imem_*, dmem_*),
// write per-PE memories through cfg (addressed by cfg.row/cfg.col), set
// own_chip and n_layers, then pulse start. sel_all/sel_row/sel_col choose
// which PEs execute the broadcast instructions (all, or a single PE for
// per-neuron preloading). Timing: the instruction reaches the PEs two
// cycles after it is fetched (sequencer register plus row register).
// Lint notes: the sequencer's pc_o debug output is left unconnected. The
// read-out assertion in mp_array samples rst_n in its disable condition,
// which the linter reports as rst_n being used both synchronously and
// asynchronously; no flip-flop uses it synchronously.
module heens_top
  import heens_pkg::*;
#(
  parameter int unsigned ROWS        = 12,
  parameter int unsigned COLS        = 12,
  parameter int unsigned VIRT_LAYERS = 8,
  parameter int unsigned LOCAL_SYN   = 100,
  parameter int unsigned GLOBAL_SYN  = 32,
  parameter int unsigned BRAM_DEPTH  = 1024,
  parameter int unsigned IMEM_DEPTH  = 1024,
  parameter int unsigned DMEM_DEPTH  = 128
) (
  input  logic                          clk,
  input  logic                          rst_n,
  input  logic [CHIP_W-1:0]             own_chip,
  input  logic [VIRT_W-1:0]             n_layers,
  // host
  input  logic                          imem_we,
  input  logic [$clog2(IMEM_DEPTH)-1:0] imem_addr,
  input  iword_t                        imem_data,
  input  logic                          dmem_we,
  input  logic [$clog2(DMEM_DEPTH)-1:0] dmem_addr,
  input  logic [31:0]                   dmem_data,
  output logic [31:0]                   dmem_q,
  input  cfg_t                          cfg,
  input  logic                          start,
  input  logic                          sel_all,
  input  logic [RC_W-1:0]               sel_row,
  input  logic [RC_W-1:0]               sel_col,
  output logic                          busy,
  output logic                          int_o,
  input  logic                          int_ack,
  output logic [DW-1:0]                 ext_buffer,  // STOREB word of the addressed PE
  // ring interface
  output spike_t                        aer_out,
  output logic [VIRT_W-1:0]             aer_out_layer,
  output logic [RC_W-1:0]               aer_out_row,
  output logic [RC_W-1:0]               aer_out_col,
  input  spike_t                        aer_in,
  output logic                          aer_in_ready,
  output logic                          eo_exec,
  input  logic                          cam_en
);

  pe_instr_t           instr;
  logic                en_spike, spk_clr, dist_done;
  logic [BRAM_DW-1:0]  rb_bram;
  spike_t              spike_out, spike_in;

  sequencer #(.IMEM_DEPTH(IMEM_DEPTH), .DMEM_DEPTH(DMEM_DEPTH)) u_seq (
    .clk, .rst_n, .imem_we, .imem_addr, .imem_data, .dmem_we, .dmem_addr, .dmem_data,
    .dmem_q, .start, .sel_all, .sel_row, .sel_col, .n_layers,
    .instr, .en_spike, .spk_clr, .dist_done, .rb_data(rb_bram),
    .eo_exec, .cam_en, .int_o, .int_ack, .busy, .pc_o()
  );

  mp_array #(
    .ROWS(ROWS), .COLS(COLS), .VIRT_LAYERS(VIRT_LAYERS), .LOCAL_SYN(LOCAL_SYN),
    .GLOBAL_SYN(GLOBAL_SYN), .BRAM_DEPTH(BRAM_DEPTH)
  ) u_array (
    .clk, .rst_n, .instr, .cfg, .spike_in, .own_chip, .n_layers, .en_spike, .spk_clr,
    .dist_done, .spike_out, .spike_layer(aer_out_layer), .spike_row(aer_out_row),
    .spike_col(aer_out_col), .rb_bram, .rb_buf(ext_buffer)
  );

  // Local spikes loop back at once; ring spikes fill the free cycles.
  assign aer_out      = spike_out;
  assign aer_in_ready = !spike_out.valid;
  assign spike_in     = spike_out.valid ? spike_out : (aer_in.valid ? aer_in : '0);

endmodule
