// ics_risc: the 32-bit control processor of a unit chip (ICS side).
//
// It runs the unit chip's program and directs the PE array: it issues PE
// instructions to the switch blocks, loads their data-bus lanes, reads PE
// results back, and drives the data memory, the frame buffer and the
// memory-mapped I/O unit (DMA, program-bank select, mailbox link, array
// configuration).  Instruction set: see ics_pkg.
//
// Pipeline: three stages, fetch (F), decode (D) and execute (E).  Registers
// (32 x 32 bits, r0 = 0) are read and written in E, so a result is visible to
// the very next instruction and no forwarding is needed.  Taken branches,
// JMP and LOOP are resolved in E and discard the two younger instructions
// (2 clocks).  E stalls - and with it F and D - while a PEI or PEX finds the PE
// array busy (bit-serial multiply in progress), and a PERD waits until the
// results of earlier PE instructions have arrived (one clock when it follows
// a PEI directly, longer while the array is busy).  HALT freezes the pipeline;
// only reset restarts it.  Loads read combinationally in E.
//
// Loop buffer (16 x 32 bits): LOOP rs, n runs the following n+1 instruction
// words R[rs] times (once if R[rs] < 2).  During the first pass F fetches
// them from program memory and copies them into the buffer; the remaining
// passes are fed to D from the buffer, with no program-memory fetch
// (imem_fetch stays low).  Loop bodies must not contain branches, LOOP or
// HALT.
//
// The pipeline depth, the register file and loop-buffer sizes follow the
// published processor; the instruction set, the branch handling, the stall
// rule and the loop-buffer protocol are choices of this design.
module ics_risc
  import ics_pkg::*;
#(
  parameter int NREGS    = 32,
  parameter int LB_DEPTH = 16
) (
  input  logic        clk,
  input  logic        rst_n,
  // instruction fetch
  output logic [31:0] imem_addr,
  output logic        imem_fetch,
  input  logic [31:0] imem_rdata,
  // data bus (data memory, frame buffer, I/O)
  output logic        dbus_req,
  output logic        dbus_we,
  output logic [1:0]  dbus_size,
  output logic [31:0] dbus_addr,
  output logic [31:0] dbus_wdata,
  input  logic [31:0] dbus_rdata,
  // PE array control (to the switch blocks)
  output logic        pei_valid,
  output logic [3:0]  pei_quads,
  output logic [1:0]  pei_types,
  output logic [18:0] pei_instr,
  output pe_pkg::pei_mode_e pei_mode,
  output logic [1:0]  pei_slot,
  output logic        bus_we,
  output logic [3:0]  bus_quads,
  output logic [15:0] bus_wdata,
  output logic        cfg_we,
  output logic [3:0]  cfg_quads,
  output logic [4:0]  cfg_wdata,
  output logic [1:0]  rd_quad,
  input  logic [31:0] rd_word,
  input  logic        pe_busy,
  // status
  output logic        halted,
  output logic        stall
);

  localparam int LBW = $clog2(LB_DEPTH);

  logic [31:0] regs [NREGS];

  // ---------------- fetch ----------------
  typedef enum logic [1:0] {LB_OFF, LB_FILL, LB_REPLAY} lb_mode_e;
  lb_mode_e    lb_mode;
  logic [31:0] lb [LB_DEPTH];
  logic [31:0] lb_start;
  logic [LBW:0] lb_len;
  logic [LBW-1:0] lb_idx;
  logic [31:0] lb_iter;
  logic [31:0] pc_f;
  logic [31:0] f_instr, f_pc;

  assign imem_addr = pc_f;
  assign f_instr   = (lb_mode == LB_REPLAY) ? lb[lb_idx] : imem_rdata;
  assign f_pc      = (lb_mode == LB_REPLAY) ? lb_start + 32'(lb_idx) : pc_f;

  // ---------------- pipeline registers ----------------
  logic        d_valid, e_valid;
  logic [31:0] d_instr, d_pc, e_pc;

  typedef struct packed {
    ics_op_e     op;
    logic [4:0]  rd, rs, rt;
    logic [31:0] simm;
    logic [15:0] imm;
  } dec_t;
  dec_t d_dec, e;

  // decode
  always_comb begin
    d_dec.op   = ics_op_e'(d_instr[31:26]);
    d_dec.rd   = d_instr[25:21];
    d_dec.rs   = d_instr[20:16];
    d_dec.rt   = d_instr[15:11];
    d_dec.imm  = d_instr[15:0];
    d_dec.simm = {{16{d_instr[15]}}, d_instr[15:0]};
  end

  // ---------------- execute ----------------
  logic [31:0] rs_v, rt_v, rd_v, res, ea, br_target;
  logic        wr_rd, redirect, e_fire, is_loop;

  assign rs_v = (e.rs == 5'd0) ? '0 : regs[e.rs];
  assign rt_v = (e.rt == 5'd0) ? '0 : regs[e.rt];
  assign rd_v = (e.rd == 5'd0) ? '0 : regs[e.rd];
  assign ea   = rs_v + e.simm;

  // PE results appear two clocks after a PEI fires (switch block, then PE)
  logic pei_last;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) pei_last <= 1'b0;
    else        pei_last <= pei_valid && (pei_mode != pe_pkg::PEI_STORE);
  end
  assign stall  = e_valid && !halted &&
                  (((e.op inside {OP_PEI, OP_PEX}) && pe_busy) ||
                   ((e.op == OP_PERD) && (pe_busy || pei_last)));
  assign e_fire = e_valid && !halted && !stall;

  always_comb begin
    res       = '0;
    wr_rd     = 1'b0;
    redirect  = 1'b0;
    br_target = e_pc + 32'd1 + e.simm;
    is_loop   = 1'b0;
    case (e.op)
      OP_ADD:  begin res = rs_v + rt_v;            wr_rd = 1'b1; end
      OP_SUB:  begin res = rs_v - rt_v;            wr_rd = 1'b1; end
      OP_AND:  begin res = rs_v & rt_v;            wr_rd = 1'b1; end
      OP_OR:   begin res = rs_v | rt_v;            wr_rd = 1'b1; end
      OP_XOR:  begin res = rs_v ^ rt_v;            wr_rd = 1'b1; end
      OP_ADDI: begin res = ea;                     wr_rd = 1'b1; end
      OP_LUI:  begin res = {e.imm, 16'b0};         wr_rd = 1'b1; end
      OP_SLL:  begin res = rs_v << e.imm[4:0];     wr_rd = 1'b1; end
      OP_SRL:  begin res = rs_v >> e.imm[4:0];     wr_rd = 1'b1; end
      OP_LW, OP_LH, OP_LB: begin res = dbus_rdata; wr_rd = 1'b1; end
      OP_PERD: begin res = rd_word;                wr_rd = 1'b1; end
      OP_BEQ:  redirect = (rd_v == rs_v);
      OP_BNE:  redirect = (rd_v != rs_v);
      OP_JMP:  begin redirect = 1'b1; br_target = {16'b0, e.imm}; end
      OP_LOOP: begin redirect = 1'b1; br_target = e_pc + 32'd1; is_loop = 1'b1; end
      default: ;
    endcase
  end

  // data bus
  always_comb begin
    dbus_req   = e_fire && (e.op inside {OP_LW, OP_LH, OP_LB, OP_SW, OP_SH, OP_SB});
    dbus_we    = e_fire && (e.op inside {OP_SW, OP_SH, OP_SB});
    dbus_addr  = ea;
    dbus_wdata = rd_v;
    case (e.op)
      OP_LB, OP_SB: dbus_size = 2'd0;
      OP_LH, OP_SH: dbus_size = 2'd1;
      default:      dbus_size = 2'd2;
    endcase
  end

  // PE array control
  always_comb begin
    pei_valid = e_fire && (e.op inside {OP_PEI, OP_PEST, OP_PEX});
    pei_slot  = e.imm[7:6];
    if (e.op == OP_PEI) begin
      pei_mode  = pe_pkg::PEI_DIRECT;
      pei_quads = e.rd[4:1];
      pei_types = {e.rd[0], e.rs[4]};
      pei_instr = {e.rs[2:0], e.imm};
    end else begin
      pei_mode  = (e.op == OP_PEST) ? pe_pkg::PEI_STORE : pe_pkg::PEI_EXEC;
      pei_quads = e.imm[3:0];
      pei_types = e.imm[5:4];
      pei_instr = rs_v[18:0];
    end
  end
  assign bus_we    = e_fire && (e.op == OP_PEBUS);
  assign bus_quads = e.imm[3:0];
  assign bus_wdata = rs_v[15:0];
  assign cfg_we    = e_fire && (e.op == OP_SBCFG);
  assign cfg_quads = e.imm[3:0];
  assign cfg_wdata = rs_v[4:0];
  assign rd_quad   = e.imm[1:0];

  // ---------------- state update ----------------
  logic advance;
  assign advance = !halted && !stall;
  assign imem_fetch = advance && (lb_mode != LB_REPLAY);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pc_f     <= '0;
      d_valid  <= 1'b0;
      e_valid  <= 1'b0;
      d_instr  <= '0;
      d_pc     <= '0;
      e        <= '0;
      e_pc     <= '0;
      halted   <= 1'b0;
      lb_mode  <= LB_OFF;
      lb_start <= '0;
      lb_len   <= '0;
      lb_idx   <= '0;
      lb_iter  <= '0;
      for (int k = 0; k < NREGS; k++) regs[k] <= '0;
    end else if (advance) begin
      // execute
      if (e_fire) begin
        if (wr_rd && e.rd != 5'd0) regs[e.rd] <= res;
        if (e.op == OP_HALT) halted <= 1'b1;
      end
      if (e_fire && redirect) begin
        d_valid <= 1'b0;
        e_valid <= 1'b0;
        pc_f    <= br_target;
        lb_mode <= LB_OFF;
        if (is_loop && rs_v >= 32'd2) begin
          lb_mode  <= LB_FILL;
          lb_start <= br_target;
          lb_len   <= (LBW+1)'(e.imm[LBW-1:0]) + 1'b1;
          lb_iter  <= rs_v - 32'd1;
        end
      end else begin
        // D -> E, F -> D
        e_valid <= d_valid && !(e_fire && e.op == OP_HALT);
        e       <= d_dec;
        e_pc    <= d_pc;
        d_valid <= !(e_fire && e.op == OP_HALT);
        d_instr <= f_instr;
        d_pc    <= f_pc;
        case (lb_mode)
          LB_FILL: begin
            lb[LBW'(pc_f - lb_start)] <= imem_rdata;
            pc_f <= pc_f + 32'd1;
            if (pc_f - lb_start == 32'(lb_len) - 32'd1) begin
              lb_mode <= LB_REPLAY;
              lb_idx  <= '0;
            end
          end
          LB_REPLAY: begin
            if (32'(lb_idx) == 32'(lb_len) - 32'd1) begin
              lb_idx <= '0;
              if (lb_iter == 32'd1) lb_mode <= LB_OFF;
              else lb_iter <= lb_iter - 32'd1;
            end else begin
              lb_idx <= lb_idx + 1'b1;
            end
          end
          default: pc_f <= pc_f + 32'd1;
        endcase
      end
    end
  end

endmodule
