// register_bank: the 8 visible and 8 shadow 16-bit registers of a PE.
//
// R0 is the accumulator. Each visible register Rk has a shadow SRk; SWAPS
// exchanges the pair, MOVRS copies the shadow into the visible register.
// Port priority within one cycle (only one opcode is active per cycle, so
// at most one of these is used): swap/movrs on sel, a general write of
// wr_data into register sel, and independent writes of R0 (acc_we) and R1
// (r1_we) for ALU, memory and multiply results. All writes take effect on
// the next rising clock edge; reads are combinational. Reset clears all
// sixteen registers (reset value is this design's choice).
module register_bank
  import heens_pkg::*;
#(
  parameter int unsigned NREGS = 8,
  parameter int unsigned W     = 16
) (
  input  logic                      clk,
  input  logic                      rst_n,
  input  logic [$clog2(NREGS)-1:0]  sel,
  input  logic                      wr_en,    // Rsel <= wr_data
  input  logic [W-1:0]              wr_data,
  input  logic                      swap_en,  // Rsel <=> SRsel
  input  logic                      movrs_en, // Rsel <= SRsel
  input  logic                      acc_we,   // R0 <= acc_d
  input  logic [W-1:0]              acc_d,
  input  logic                      r1_we,    // R1 <= r1_d
  input  logic [W-1:0]              r1_d,
  output logic [W-1:0]              regs   [NREGS],
  output logic [W-1:0]              shadow [NREGS]
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < NREGS; i++) begin
        regs[i]   <= '0;
        shadow[i] <= '0;
      end
    end else begin
      if (acc_we) regs[0] <= acc_d;
      if (r1_we)  regs[1] <= r1_d;
      if (wr_en)  regs[sel] <= wr_data;
      if (swap_en) begin
        regs[sel]   <= shadow[sel];
        shadow[sel] <= regs[sel];
      end else if (movrs_en) begin
        regs[sel] <= shadow[sel];
      end
    end
  end

endmodule
