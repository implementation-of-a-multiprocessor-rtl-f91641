// processing_element: one neuron processor of the SIMD array.
//
// Every cycle the PE receives the broadcast instruction and executes it if
// it is addressed (sel_all, or sel_row/sel_col equal to its own position).
// Inside are the register bank (R0 = accumulator), the ALU with C/Z flags,
// the 64-bit LFSR, the freeze LIFO, the synapse/neuron memory with its
// block pointer BP, the local and global associative spike memories with
// their spike registers, the external buffer written by STOREB and one
// output-spike bit Si per virtual layer written by STOREPS. Register, flag,
// memory and Si writes happen only while the freeze stack is all zero;
// FREEZE*/UNFREEZE themselves always act.
//
// Timing: one instruction per cycle, results visible the next cycle.
// MUL/MULS arrive for two consecutive cycles and are written only in the
// second, because the ALU registers the multiplier operands.
//
// Spike read-out (distribution): the PE offers Si of the layer being
// distributed. row_out = row_in | spike chains along the row so the row
// knows it holds spikes; col_out = col_in | (spike & row_en) chains along
// the column so the array sees which columns of the enabled row hold
// spikes; when the array selects this PE's row and column the spike bit is
// cleared on the next edge. LOADSP picks input spike bit BP[7:0] from
// {global spike register, local spike register} (local synapses first).
// The choices of this design are listed in each submodule; here they are
// the PE-select scheme, BP clearing at each distribution start and the
// local/global split by source chip identifier.
// Lint notes: the shadow registers, the freeze-stack contents, LFSR bits
// 63:16 and BP bits 9:8 are produced by submodules but not read here (only
// the all-zero freeze flag, the low LFSR word and an 8-bit spike index are
// needed); they are left connected so the submodules stay complete.
module processing_element
  import heens_pkg::*;
#(
  parameter int unsigned ROW         = 0,
  parameter int unsigned COL         = 0,
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
  input  logic                spk_clr,     // distribution starts
  input  logic [VIRT_W-1:0]   dist_layer,
  input  logic                row_in,
  output logic                row_out,
  input  logic                col_in,
  output logic                col_out,
  input  logic                row_en,
  input  logic                row_sel,
  input  logic                col_sel,
  output logic                selected,    // addressed by sel_row/sel_col
  output logic [BRAM_DW-1:0]  rb_bram,     // word BP, for READMP
  output logic [DW-1:0]       ext_buffer,  // STOREB register
  output logic [DW-1:0]       regs_o [8],  // visible registers (observation)
  output logic [VIRT_LAYERS-1:0] si_o
);

  localparam int unsigned NSYN = LOCAL_SYN + GLOBAL_SYN;

  opcode_e              op;
  logic [2:0]           rsel;
  logic                 en, no_freeze, mul_ph, mul_op, mul_wr;
  logic [DW-1:0]        regs [8];
  logic [DW-1:0]        shadow [8];
  logic                 wr_en, swap_en, movrs_en, acc_we, r1_we;
  logic [DW-1:0]        wr_data, acc_d, r1_d;
  logic [DW-1:0]        alu_res, alu_lo;
  logic                 alu_valid, c, z, flag_we;
  logic [63:0]          lfsr_q;
  logic                 random_en;
  logic                 push, push_val, pop;
  logic [7:0]           fstack;
  logic [BRAM_DW-1:0]   bram_q;
  logic [$clog2(BRAM_DEPTH)-1:0] bp;
  logic                 bram_we;
  logic [LOCAL_SYN-1:0] loc_spk;
  logic [GLOBAL_SYN-1:0] glb_spk;
  logic                 sj;
  logic [VIRT_LAYERS-1:0] si;
  logic                 spk, cfg_me, is_local;

  assign selected = instr.sel_row == RC_W'(ROW) && instr.sel_col == RC_W'(COL);
  assign op       = (instr.sel_all || selected) ? instr.op : OP_NOP;
  assign rsel     = instr.operand[2:0];
  assign en       = no_freeze;
  assign mul_op   = op == OP_MUL || op == OP_MULS;
  assign mul_wr   = mul_op && mul_ph;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) mul_ph <= 1'b0;
    else        mul_ph <= mul_op && !mul_ph;
  end

  // Input spike bit addressed by BP.
  always_comb begin
    int unsigned idx;
    idx = int'(bp[7:0]);
    sj  = 1'b0;
    if (idx < LOCAL_SYN)  sj = loc_spk[idx];
    else if (idx < NSYN)  sj = glb_spk[idx - LOCAL_SYN];
  end

  // Decode.
  always_comb begin
    wr_en = 1'b0; wr_data = '0; swap_en = 1'b0; movrs_en = 1'b0;
    acc_we = 1'b0; acc_d = alu_res; r1_we = 1'b0; r1_d = alu_lo;
    bram_we = 1'b0; push = 1'b0; push_val = 1'b0; pop = 1'b0;
    unique case (op)
      OP_LDALL:   begin wr_en = en; wr_data = instr.data; end
      OP_RST:     begin wr_en = en; wr_data = '0; end
      OP_SET:     begin wr_en = en; wr_data = '1; end
      OP_MOVR:    begin wr_en = en; wr_data = regs[0]; end
      OP_SWAPS:   swap_en  = en;
      OP_MOVRS:   movrs_en = en;
      OP_LLFSR:   begin acc_we = en; acc_d = lfsr_q[DW-1:0]; end
      OP_LOADSP:  begin acc_we = en; acc_d = {bram_q[DW-1:1], sj};
                        r1_we = en; r1_d = bram_q[BRAM_DW-1:DW]; end
      OP_LOADSN:  begin acc_we = en; acc_d = bram_q[DW-1:0];
                        r1_we = en; r1_d = bram_q[BRAM_DW-1:DW]; end
      OP_STORESP: bram_we = en;
      OP_FREEZEC:  begin push = 1'b1; push_val = c;  end
      OP_FREEZENC: begin push = 1'b1; push_val = !c; end
      OP_FREEZEZ:  begin push = 1'b1; push_val = z;  end
      OP_FREEZENZ: begin push = 1'b1; push_val = !z; end
      OP_UNFREEZE: pop = 1'b1;
      OP_MUL:     begin acc_we = en && mul_wr; r1_we = en && mul_wr; end
      OP_MULS:    acc_we = en && mul_wr;
      default:    acc_we = en && alu_valid;
    endcase
  end

  assign flag_we = en && (!mul_op || mul_wr);

  register_bank #(.NREGS(8), .W(DW)) u_regs (
    .clk, .rst_n, .sel(rsel), .wr_en, .wr_data, .swap_en, .movrs_en,
    .acc_we, .acc_d, .r1_we, .r1_d, .regs, .shadow
  );

  alu #(.W(DW)) u_alu (
    .clk, .rst_n, .op, .a(regs[0]), .b(regs[rsel]), .n(instr.operand[3:0]),
    .flag_we, .res(alu_res), .res_lo(alu_lo), .res_valid(alu_valid), .c, .z
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                          random_en <= 1'b0;
    else if (en && op == OP_RANDON)      random_en <= 1'b1;
    else if (en && op == OP_RANDOFF)     random_en <= 1'b0;
  end

  lfsr #(.W(64)) u_lfsr (
    .clk, .rst_n, .enable(random_en), .seed_we(en && op == OP_SEED),
    .seed({regs[1], regs[0]}), .state(lfsr_q)
  );

  freeze_lifo #(.DEPTH(8)) u_freeze (
    .clk, .rst_n, .push, .push_val, .pop, .lifo(fstack), .no_freeze
  );

  assign cfg_me = cfg.we && cfg.row == RC_W'(ROW) && cfg.col == RC_W'(COL);

  snbram #(.DEPTH(BRAM_DEPTH), .W(BRAM_DW)) u_bram (
    .clk, .rst_n, .bp_clr(spk_clr), .we(bram_we), .wdata({regs[1], regs[0]}),
    .cfg_we(cfg_me && cfg.mem == CFG_SNBRAM), .cfg_addr(cfg.addr[$clog2(BRAM_DEPTH)-1:0]),
    .cfg_data(cfg.data), .rdata(bram_q), .bp
  );

  assign is_local = spike_in.chip == own_chip;

  local_spike_mem #(.LOCAL_SYN(LOCAL_SYN), .ADDR_W(LIN_W), .DATA_W(7)) u_local (
    .clk, .rst_n, .cfg_we(cfg_me && cfg.mem == CFG_LOCAL), .cfg_addr(cfg.addr),
    .cfg_data(cfg.data[6:0]), .spk_valid(spike_in.valid && is_local),
    .spk_addr(spike_in.lin), .clr(spk_clr), .spk_reg(loc_spk)
  );

  global_spike_mem #(.GLOBAL_SYN(GLOBAL_SYN), .CODE_W(5), .ID_W(CHIP_W), .ADDR_W(LIN_W)) u_global (
    .clk, .rst_n, .cfg_we(cfg_me), .cfg_mem(cfg.mem), .cfg_addr(cfg.addr),
    .cfg_data(cfg.data[GLOBAL_SYN-1:0]), .spk_valid(spike_in.valid && !is_local),
    .spk_id(spike_in.chip), .spk_addr(spike_in.lin), .clr(spk_clr), .spk_reg(glb_spk)
  );

  // External buffer (STOREB) and output spikes per virtual layer (STOREPS).
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ext_buffer <= '0;
      si         <= '0;
    end else begin
      if (en && op == OP_STOREB) ext_buffer <= regs[0];
      if (row_sel && col_sel)    si[dist_layer] <= 1'b0;
      else if (en && op == OP_STOREPS) si[instr.virt] <= regs[0][0];
    end
  end

  // Spike read-and-reset chain.
  assign spk     = si[dist_layer];
  assign row_out = row_in | spk;
  assign col_out = col_in | (spk & row_en);

  assign rb_bram = bram_q;
  assign regs_o  = regs;
  assign si_o    = si;

endmodule
