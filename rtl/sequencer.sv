// sequencer: control unit that runs the neural program on the array.
//
// Instructions are 16-bit words {opcode[15:10], operand[9:0]} held in an
// IMEM_DEPTH-word instruction memory; 32-bit constants sit in a DMEM_DEPTH
// data memory. Both are loaded by the host through the *_we ports while
// the sequencer is idle. After start, one instruction is fetched per
// cycle and every instruction is broadcast, registered, on the
// instruction bus (the PEs ignore the control opcodes). The sequencer
// itself executes:
//  * LDALL r,k   broadcasts DMEM[k][15:0] with the opcode (operand = {k, r});
//  * MUL/MULS    are held on the bus for two cycles;
//  * LOOP n / LOOPV k push n-1 (or DMEM[k]-1) on the loop stack and PC+1 on
//    the PC stack; ENDL decrements and jumps back, or pops both at zero;
//  * GOSUB a pushes PC+1 and jumps; RET pops; GOTO a jumps;
//  * HALT raises int_o and waits for int_ack;
//  * SPKDIS ends one pass: if more virtual layers are in use (virt <
//    n_layers) the next layer is started, otherwise the spike
//    distribution phase runs (spk_clr pulse, en_spike high until the
//    array reports dist_done) and the sequencer then waits until the ring
//    controller drops cam_en before continuing with layer 0;
//  * READMP k    waits RB_LAT cycles and stores the read-back word of the
//    addressed PE (its memory word at BP) into DMEM[k].
// The instruction set is the document's; the word format, the stack
// depths, GOTO's code, the virtual-layer loop and the READMP read-back
// path are this design's choices.
// Lint note: only the low 16 bits of a DMEM word are used by LDALL and
// LOOPV; the upper half exists because READMP stores 32-bit words.
module sequencer
  import heens_pkg::*;
#(
  parameter int unsigned IMEM_DEPTH = 1024,
  parameter int unsigned DMEM_DEPTH = 128,
  parameter int unsigned STACK      = 8,
  parameter int unsigned RB_LAT     = 3
) (
  input  logic                          clk,
  input  logic                          rst_n,
  // host load and control
  input  logic                          imem_we,
  input  logic [$clog2(IMEM_DEPTH)-1:0] imem_addr,
  input  iword_t                        imem_data,
  input  logic                          dmem_we,
  input  logic [$clog2(DMEM_DEPTH)-1:0] dmem_addr,
  input  logic [31:0]                   dmem_data,
  output logic [31:0]                   dmem_q,     // DMEM[dmem_addr]
  input  logic                          start,
  input  logic                          sel_all,
  input  logic [RC_W-1:0]               sel_row,
  input  logic [RC_W-1:0]               sel_col,
  input  logic [VIRT_W-1:0]             n_layers,
  // array side
  output pe_instr_t                     instr,
  output logic                          en_spike,
  output logic                          spk_clr,
  input  logic                          dist_done,
  input  logic [BRAM_DW-1:0]            rb_data,
  // ring controller and host handshakes
  output logic                          eo_exec,
  input  logic                          cam_en,
  output logic                          int_o,
  input  logic                          int_ack,
  output logic                          busy,
  output logic [$clog2(IMEM_DEPTH)-1:0] pc_o
);

  localparam int unsigned IAW = $clog2(IMEM_DEPTH);
  localparam int unsigned DAW = $clog2(DMEM_DEPTH);
  localparam int unsigned SPW = $clog2(STACK + 1);
  localparam int unsigned SIW = $clog2(STACK);

  typedef enum logic [2:0] {S_IDLE, S_RUN, S_MUL2, S_HALT, S_DIST, S_WAITCAM, S_READMP} state_e;

  iword_t          imem [IMEM_DEPTH];
  logic [31:0]     dmem [DMEM_DEPTH];
  logic [IAW-1:0]  pcstk [STACK];
  logic [15:0]     lpstk [STACK];
  logic [SPW-1:0]  psp, lsp;
  state_e          state;
  logic [IAW-1:0]  pc;
  logic [VIRT_W-1:0] virt;
  logic [3:0]      wait_cnt;
  logic [DAW-1:0]  rb_dst;
  iword_t          w;
  logic [SIW-1:0]  pnext, lnext, ptop, ltop;   // push slot and top entry
  logic [31:0]     dword;      // DMEM word named by the operand

  assign w      = imem[pc];
  assign pnext  = psp[SIW-1:0];
  assign lnext  = lsp[SIW-1:0];
  assign ptop   = SIW'(psp - 1'b1);
  assign ltop   = SIW'(lsp - 1'b1);
  assign dword  = dmem[w.operand[OPND_W-1:3]];
  assign dmem_q = dmem[dmem_addr];
  assign busy   = state != S_IDLE;
  assign pc_o   = pc;
  assign en_spike = state == S_DIST;

  always_ff @(posedge clk) begin
    if (imem_we && state == S_IDLE) imem[imem_addr] <= imem_data;
  end

  always_ff @(posedge clk) begin
    if (dmem_we && state == S_IDLE) dmem[dmem_addr] <= dmem_data;
    else if (state == S_READMP && wait_cnt == 0) dmem[rb_dst] <= rb_data;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state    <= S_IDLE;
      pc       <= '0;
      psp      <= '0;
      lsp      <= '0;
      virt     <= '0;
      instr    <= '0;
      spk_clr  <= 1'b0;
      eo_exec  <= 1'b0;
      int_o    <= 1'b0;
      wait_cnt <= '0;
      rb_dst   <= '0;
      for (int i = 0; i < STACK; i++) begin
        pcstk[i] <= '0;
        lpstk[i] <= '0;
      end
    end else begin
      spk_clr      <= 1'b0;
      eo_exec      <= 1'b0;
      instr.sel_all <= sel_all;
      instr.sel_row <= sel_row;
      instr.sel_col <= sel_col;
      instr.virt    <= virt;
      unique case (state)
        S_IDLE: begin
          instr.op <= OP_NOP;
          if (start) begin
            state <= S_RUN;
            pc    <= '0;
            psp   <= '0;
            lsp   <= '0;
            virt  <= '0;
          end
        end
        S_RUN: begin
          instr.op      <= w.op;
          instr.operand <= w.operand;
          instr.data    <= dword[DW-1:0];
          pc            <= pc + 1'b1;
          unique case (w.op)
            OP_MUL, OP_MULS: begin
              state <= S_MUL2;
              pc    <= pc;
            end
            OP_LOOP, OP_LOOPV: begin
              pcstk[pnext] <= pc + 1'b1;
              lpstk[lnext] <= (w.op == OP_LOOP) ? 16'(w.operand) - 1'b1 : dword[15:0] - 1'b1;
              psp <= psp + 1'b1;
              lsp <= lsp + 1'b1;
            end
            OP_ENDL: begin
              if (lpstk[ltop] == 0) begin
                psp <= psp - 1'b1;
                lsp <= lsp - 1'b1;
              end else begin
                lpstk[ltop] <= lpstk[ltop] - 1'b1;
                pc <= pcstk[ptop];
              end
            end
            OP_GOSUB: begin
              pcstk[pnext] <= pc + 1'b1;
              psp <= psp + 1'b1;
              pc  <= w.operand[IAW-1:0];
            end
            OP_RET: begin
              psp <= psp - 1'b1;
              pc  <= pcstk[ptop];
            end
            OP_GOTO: pc <= w.operand[IAW-1:0];
            OP_HALT: begin
              int_o <= 1'b1;
              state <= S_HALT;
              pc    <= pc;
            end
            OP_SPKDIS: begin
              eo_exec <= 1'b1;
              if (virt < n_layers) begin
                virt <= virt + 1'b1;
              end else begin
                state   <= S_DIST;
                spk_clr <= 1'b1;
                pc      <= pc;
              end
            end
            OP_READMP: begin
              state    <= S_READMP;
              wait_cnt <= 4'(RB_LAT - 1);
              rb_dst   <= w.operand[OPND_W-1:3];
              pc       <= pc;
            end
            default: ;
          endcase
        end
        S_MUL2: begin
          state <= S_RUN;
          pc    <= pc + 1'b1;
        end
        S_HALT: begin
          instr.op <= OP_NOP;
          if (int_ack) begin
            int_o <= 1'b0;
            state <= S_RUN;
            pc    <= pc + 1'b1;
          end
        end
        S_DIST: begin
          instr.op <= OP_NOP;
          if (dist_done) state <= S_WAITCAM;
        end
        S_WAITCAM: begin
          if (!cam_en) begin
            state <= S_RUN;
            virt  <= '0;
            pc    <= pc + 1'b1;
          end
        end
        S_READMP: begin
          instr.op <= OP_NOP;
          if (wait_cnt == 0) begin
            state <= S_RUN;
            pc    <= pc + 1'b1;
          end else begin
            wait_cnt <= wait_cnt - 1'b1;
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

endmodule
