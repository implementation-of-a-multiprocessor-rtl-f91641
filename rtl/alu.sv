// alu: arithmetic/logic unit of one processing element.
//
// Every operation is evaluated in parallel and the opcode picks the result,
// as the array's ALU does. Operand a is the accumulator R0, operand b the
// register named by the instruction. ADD/SUB saturate to the signed 16-bit
// range; MUL returns the signed 32-bit product as {hi, lo} (hi to ACC, lo to
// R1) and MULS only its most significant word. Both multiplier operands are
// registered every cycle, so a product is valid one cycle after its operands
// appear: the sequencer holds MUL/MULS for two cycles and the PE writes only
// in the second. The carry C and zero Z flags are registers updated when
// flag_we is high.
//
// Choices of this design where the document is silent: C is the unsigned
// carry/borrow of add/sub/inc/dec and the last bit shifted out by SHLN/SHRN;
// RTL/RTR rotate through the carry; Z follows every result-producing
// operation; shifts are logical.
module alu
  import heens_pkg::*;
#(
  parameter int unsigned W = 16
) (
  input  logic          clk,
  input  logic          rst_n,
  input  opcode_e       op,
  input  logic [W-1:0]  a,        // accumulator
  input  logic [W-1:0]  b,        // selected register
  input  logic [3:0]    n,        // shift count, 1..8
  input  logic          flag_we,  // commit C/Z (gated by freeze in the PE)
  output logic [W-1:0]  res,      // new accumulator value
  output logic [W-1:0]  res_lo,   // low product word (MUL -> R1)
  output logic          res_valid,// op produces an accumulator value
  output logic          c,
  output logic          z
);

  localparam logic signed [W-1:0] SMAX = {1'b0, {(W-1){1'b1}}};
  localparam logic signed [W-1:0] SMIN = {1'b1, {(W-1){1'b0}}};

  logic signed [W-1:0]   a_q, b_q;     // multiplier operand pipeline
  logic signed [2*W-1:0] prod;
  logic                  c_d, z_d, c_upd, z_upd;
  logic [W:0]            sum, dif;
  logic [W-1:0]          sh;
  logic                  sh_c;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      a_q <= '0;
      b_q <= '0;
    end else begin
      a_q <= a;
      b_q <= b;
    end
  end

  assign prod = a_q * b_q;
  assign sum  = {1'b0, a} + {1'b0, b};
  assign dif  = {1'b0, a} - {1'b0, b};

  // Logical shifts by 1..8; carry is the last bit shifted out.
  always_comb begin
    logic [2*W-1:0] t;
    sh   = a;
    sh_c = 1'b0;
    if (op == OP_SHLN) begin
      t    = {{W{1'b0}}, a} << n;
      sh   = t[W-1:0];
      sh_c = (n == 0) ? 1'b0 : t[W];
    end else begin
      t    = {a, {W{1'b0}}} >> n;
      sh   = t[2*W-1:W];
      sh_c = (n == 0) ? 1'b0 : t[W-1];
    end
  end

  always_comb begin
    logic signed [W:0] ssum, sdif;
    ssum      = $signed({a[W-1], a}) + $signed({b[W-1], b});
    sdif      = $signed({a[W-1], a}) - $signed({b[W-1], b});
    res       = a;
    res_lo    = '0;
    res_valid = 1'b1;
    c_d       = c;
    c_upd     = 1'b0;
    z_upd     = 1'b1;
    unique case (op)
      OP_ADD: begin
        if (ssum[W] != ssum[W-1]) res = ssum[W] ? SMIN : SMAX;
        else                      res = ssum[W-1:0];
        c_d = sum[W]; c_upd = 1'b1;
      end
      OP_SUB: begin
        if (sdif[W] != sdif[W-1]) res = sdif[W] ? SMIN : SMAX;
        else                      res = sdif[W-1:0];
        c_d = dif[W]; c_upd = 1'b1;
      end
      OP_MUL:  begin res = prod[2*W-1:W]; res_lo = prod[W-1:0]; end
      OP_MULS: res = prod[2*W-1:W];
      OP_AND:  res = a & b;
      OP_OR:   res = a | b;
      OP_INV:  res = ~b;
      OP_XOR:  res = a ^ b;
      OP_MOVA: res = b;
      OP_INC:  begin res = a + 1'b1; c_d = (a == '1); c_upd = 1'b1; end
      OP_DEC:  begin res = a - 1'b1; c_d = (a == '0); c_upd = 1'b1; end
      OP_SHLN, OP_SHRN: begin res = sh; c_d = sh_c; c_upd = 1'b1; end
      OP_RTL:  begin res = {a[W-2:0], c}; c_d = a[W-1]; c_upd = 1'b1; end
      OP_RTR:  begin res = {c, a[W-1:1]}; c_d = a[0];   c_upd = 1'b1; end
      OP_SETC: begin res_valid = 1'b0; z_upd = 1'b0; c_d = 1'b1; c_upd = 1'b1; end
      OP_CLRC: begin res_valid = 1'b0; z_upd = 1'b0; c_d = 1'b0; c_upd = 1'b1; end
      default: begin res_valid = 1'b0; z_upd = 1'b0; end
    endcase
    z_d = (res == '0);
    if (op == OP_SETZ) begin z_d = 1'b1; z_upd = 1'b1; end
    if (op == OP_CLRZ) begin z_d = 1'b0; z_upd = 1'b1; end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      c <= 1'b0;
      z <= 1'b0;
    end else if (flag_we) begin
      if (c_upd) c <= c_d;
      if (z_upd) z <= z_d;
    end
  end

endmodule
