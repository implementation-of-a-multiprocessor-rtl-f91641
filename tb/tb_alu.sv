// tb_alu: self-checking test of the PE arithmetic/logic unit.
// Random operands for every data opcode are compared with a reference
// model written here (saturating signed add/sub, rotate through carry,
// logical shifts, signed 16x16 product one cycle after the operands).
// Extreme values (0x7FFF, 0x8000, 0xFFFF, 0) are always included.
module tb_alu;
  import heens_pkg::*;

  logic clk = 0, rst_n = 0;
  opcode_e op;
  logic [15:0] a, b, res, res_lo;
  logic [3:0] n;
  logic flag_we, res_valid, c, z;
  int checks = 0, failures = 0;

  alu #(.W(16)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [15:0] sat(input int v);
    if (v > 32767) return 16'h7FFF;
    if (v < -32768) return 16'h8000;
    return 16'(v);
  endfunction

  task automatic check(input string what, input logic [31:0] got, input logic [31:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s op=%s a=%h b=%h n=%0d got=%h exp=%h", what, op.name(), a, b, n, got, exp);
    end
  endtask

  logic [15:0] vals [6] = '{16'h7FFF, 16'h8000, 16'hFFFF, 16'h0000, 16'h0001, 16'h1234};
  opcode_e ops [15] = '{OP_ADD, OP_SUB, OP_AND, OP_OR, OP_INV, OP_XOR, OP_MOVA, OP_INC,
                        OP_DEC, OP_SHLN, OP_SHRN, OP_RTL, OP_RTR, OP_MUL, OP_MULS};

  initial begin
    logic [15:0] e;
    logic ec, c0;
    int s;
    op = OP_NOP; a = 0; b = 0; n = 1; flag_we = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int it = 0; it < 3000; it++) begin
      op = ops[$urandom_range(0, 14)];
      a  = (it % 3 == 0) ? vals[$urandom_range(0, 5)] : 16'($urandom);
      b  = (it % 5 == 0) ? vals[$urandom_range(0, 5)] : 16'($urandom);
      n  = 4'($urandom_range(1, 8));
      flag_we = 1;
      @(posedge clk);          // operands captured; flags updated (op-dependent)
      #1;
      c0 = c;
      if (op == OP_MUL || op == OP_MULS) begin
        s = $signed(a) * $signed(b);
        check("mul_hi", res, 32'(s) >> 16);
        if (op == OP_MUL) check("mul_lo", res_lo, s & 32'hFFFF);
        @(negedge clk);
        continue;
      end
      // combinational result uses the carry now in c
      ec = c0;
      unique case (op)
        OP_ADD:  begin e = sat($signed(a) + $signed(b)); ec = ({1'b0,a} + {1'b0,b}) > 17'hFFFF; end
        OP_SUB:  begin e = sat($signed(a) - $signed(b)); ec = a < b; end
        OP_AND:  e = a & b;
        OP_OR:   e = a | b;
        OP_INV:  e = ~b;
        OP_XOR:  e = a ^ b;
        OP_MOVA: e = b;
        OP_INC:  begin e = a + 1; ec = a == 16'hFFFF; end
        OP_DEC:  begin e = a - 1; ec = a == 0; end
        OP_SHLN: begin e = a << n; ec = a[16-n]; end
        OP_SHRN: begin e = a >> n; ec = a[n-1]; end
        OP_RTL:  begin e = {a[14:0], c0}; ec = a[15]; end
        OP_RTR:  begin e = {c0, a[15:1]}; ec = a[0]; end
        default: e = 'x;
      endcase
      check("res", res, e);
      @(posedge clk); #1;
      if (op inside {OP_ADD, OP_SUB, OP_INC, OP_DEC, OP_SHLN, OP_SHRN, OP_RTL, OP_RTR})
        check("carry", c, ec);
      check("zero", z, e == 0);
      @(negedge clk);
    end
    // flag opcodes
    op = OP_SETC; @(posedge clk); #1; check("setc", c, 1);
    op = OP_CLRC; @(posedge clk); #1; check("clrc", c, 0);
    op = OP_SETZ; @(posedge clk); #1; check("setz", z, 1);
    op = OP_CLRZ; @(posedge clk); #1; check("clrz", z, 0);
    flag_we = 0; op = OP_SETC; @(posedge clk); #1; check("flag_we gate", c, 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
