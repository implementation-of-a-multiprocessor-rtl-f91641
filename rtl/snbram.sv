// snbram: synapse/neuron parameter memory of one PE with its block pointer.
//
// A DEPTH x 32-bit block RAM holding neuron parameters, synaptic weights
// and saved state. The block pointer BP addresses it during execution:
// LOADSP/LOADSN read word BP, STORESP writes {R1, ACC} to word BP and then
// increments BP. The read port is synchronous and is addressed with the
// pointer's next value, so rdata always holds word BP (old contents if
// it was written in the same cycle). A setup write from the host
// (cfg_we) takes the single write port when it is active; setup and
// execution never overlap. bp_clr returns BP to 0 at the start of every
// algorithm pass (this design's choice: the instruction set has no opcode
// that sets BP).
module snbram
  import heens_pkg::*;
#(
  parameter int unsigned DEPTH = 1024,
  parameter int unsigned W     = 32
) (
  input  logic                      clk,
  input  logic                      rst_n,
  input  logic                      bp_clr,
  input  logic                      we,       // STORESP: mem[BP] <= wdata, BP++
  input  logic [W-1:0]              wdata,
  input  logic                      cfg_we,   // setup write
  input  logic [$clog2(DEPTH)-1:0]  cfg_addr,
  input  logic [W-1:0]              cfg_data,
  output logic [W-1:0]              rdata,    // mem[BP]
  output logic [$clog2(DEPTH)-1:0]  bp
);

  localparam int unsigned AW = $clog2(DEPTH);

  logic [W-1:0]  mem [DEPTH];
  logic [AW-1:0] bp_d;

  always_comb begin
    bp_d = bp;
    if (bp_clr)  bp_d = '0;
    else if (we) bp_d = bp + 1'b1;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) bp <= '0;
    else        bp <= bp_d;
  end

  always_ff @(posedge clk) begin
    if (cfg_we)  mem[cfg_addr] <= cfg_data;
    else if (we) mem[bp] <= wdata;
    rdata <= mem[bp_d];
  end

endmodule
