// global_spike_mem: associative memory for spikes arriving from other chips.
//
// Two lookup paths run in parallel, one on the source chip identifier and
// one on the source neuron address. On each path an encoding memory
// reduces the key to a CODE_W-bit code and a conversion memory turns the
// code into a GLOBAL_SYN-bit mask of global synapses. The two masks are
// ANDed and the result is ORed into the global spike register, so a
// synapse fires only when both the chip and the neuron match. Lookups are
// two synchronous memory stages deep (spike -> register set in 3 cycles).
// The two-stage, two-path structure follows the PE block diagram; the
// code width, memory depths and mask form are this design's choices, since
// the document does not describe the memories' contents.
module global_spike_mem
  import heens_pkg::*;
#(
  parameter int unsigned GLOBAL_SYN = 32,
  parameter int unsigned CODE_W     = 5,
  parameter int unsigned ID_W       = 7,
  parameter int unsigned ADDR_W     = 11
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  cfg_we,
  input  cfg_mem_e              cfg_mem,
  input  logic [ADDR_W-1:0]     cfg_addr,
  input  logic [GLOBAL_SYN-1:0] cfg_data,
  input  logic                  spk_valid,
  input  logic [ID_W-1:0]       spk_id,
  input  logic [ADDR_W-1:0]     spk_addr,
  input  logic                  clr,
  output logic [GLOBAL_SYN-1:0] spk_reg
);

  logic [CODE_W-1:0]     enc_id [2**ID_W];
  logic [CODE_W-1:0]     enc_rc [2**ADDR_W];
  logic [GLOBAL_SYN-1:0] conv_id [2**CODE_W];
  logic [GLOBAL_SYN-1:0] conv_rc [2**CODE_W];

  logic [CODE_W-1:0]     code_id, code_rc;
  logic [GLOBAL_SYN-1:0] mask_id, mask_rc;
  logic                  v1, v2;

  always_ff @(posedge clk) begin
    if (cfg_we && cfg_mem == CFG_GENC_ID)  enc_id[cfg_addr[ID_W-1:0]]    <= cfg_data[CODE_W-1:0];
    if (cfg_we && cfg_mem == CFG_GENC_RC)  enc_rc[cfg_addr]              <= cfg_data[CODE_W-1:0];
    if (cfg_we && cfg_mem == CFG_GCONV_ID) conv_id[cfg_addr[CODE_W-1:0]] <= cfg_data;
    if (cfg_we && cfg_mem == CFG_GCONV_RC) conv_rc[cfg_addr[CODE_W-1:0]] <= cfg_data;
    code_id <= enc_id[spk_id];
    code_rc <= enc_rc[spk_addr];
    mask_id <= conv_id[code_id];
    mask_rc <= conv_rc[code_rc];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      v1 <= 1'b0;
      v2 <= 1'b0;
    end else begin
      v1 <= spk_valid;
      v2 <= v1;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)   spk_reg <= '0;
    else if (clr) spk_reg <= '0;
    else if (v2)  spk_reg <= spk_reg | (mask_id & mask_rc);
  end

endmodule
