// local_spike_mem: associative memory for spikes of neurons on this chip.
//
// Every distributed spike carries the linear address of its source neuron
// (virtual layer, row, column). A 2^ADDR_W x 7-bit memory, written during
// setup, maps that address to the local synapse of this PE that the source
// connects to; the matching bit of the local spike register is set one
// cycle after the lookup. A stored value of 0 means "not connected", k
// means synapse k-1 (this encoding is this design's choice). The spike
// register is read combinationally by index and cleared by clr at the
// start of each distribution phase.
module local_spike_mem
  import heens_pkg::*;
#(
  parameter int unsigned LOCAL_SYN = 100,
  parameter int unsigned ADDR_W    = 11,
  parameter int unsigned DATA_W    = 7
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 cfg_we,
  input  logic [ADDR_W-1:0]    cfg_addr,
  input  logic [DATA_W-1:0]    cfg_data,
  input  logic                 spk_valid,
  input  logic [ADDR_W-1:0]    spk_addr,
  input  logic                 clr,
  output logic [LOCAL_SYN-1:0] spk_reg
);

  logic [DATA_W-1:0] mem [2**ADDR_W];
  logic [DATA_W-1:0] douta;
  logic              hit_q;

  always_ff @(posedge clk) begin
    if (cfg_we) mem[cfg_addr] <= cfg_data;
    douta <= mem[spk_addr];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) hit_q <= 1'b0;
    else        hit_q <= spk_valid & ~cfg_we;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) spk_reg <= '0;
    else if (clr) spk_reg <= '0;
    else if (hit_q && douta != '0 && int'(douta) <= LOCAL_SYN)
      spk_reg[douta - 1'b1] <= 1'b1;
  end

endmodule
