// master_seq: the Master controller of one Group.
//
// It steps through a program of 64-bit microwords held in the Group's own
// memory. A fetch reads one address from all 16 Slave memories at once; the
// 16 bytes form a pair of microwords (word 0 in Slaves 0..7, word 1 in Slaves
// 8..15), which is how the document describes the fetch. The pair is kept in
// a buffer, so the second word of a pair costs no memory cycle.
//
// The same sequencer serves both layers of the machine:
//   * SIMD (gang = 0): all 16 Slaves execute the word on their own data.
//   * Master word (gang = 1): Slaves base..base+wid are chained into one
//     8/16/24/32-bit processor. Its operand bytes come from the memories of
//     Slaves mslv..mslv+wid (or their neighbours), so the Master reaches all
//     256K bytes of its Group; stores go the same way back. Flags Z/C/N are
//     kept for the conditional branches.
//   * SEND puts A of the gang's base Slave on the common bus as a write into
//     another Group's memory, waiting as long as the bus is busy.
//
// Timing (one clock = 200 ns): instruction fetch and own-memory operations
// take MEM_CYC clocks, left-right neighbour transfers HSH_CYC clocks, and
// up-down transfers VBIT_CYC clocks per bit, eight bits per byte, as the
// document gives them. A bus access to this Group's memory (steal) freezes the
// sequencer for that clock. start loads the program counter and runs; HALT
// stops and raises halted. The microword layout, opcodes and the exact clock
// placement inside an operation are this design's choices.
module master_seq
  import ppan_pkg::*;
(
  input  logic                 clk,
  input  logic                 rst,
  input  logic                 start,
  input  logic [PC_W-1:0]      start_pc,
  input  logic                 steal,        // bus uses port A this clock
  input  logic [NSLV*8-1:0]    ifetch,       // port A bytes of Slaves 15..0
  input  logic                 alu_zero,
  input  logic                 alu_cout,
  input  logic                 alu_neg,
  input  byte_t                a_base,       // A of Slave 'base', for SEND
  input  logic                 send_gnt,
  output addr_t                mem_addr,
  output slave_ctl_t           ctl,
  output logic [NSLV-1:0]      mask,         // Slaves whose A may change
  output logic [NSLV-1:0]      mem_we,       // Slave memories written this clock
  output logic [3:0]           route,        // operand of Slave k comes from Slave k+route
  output logic                 gang,
  output logic [3:0]           top,          // Slave holding the word's top byte
  output logic [3:0]           base,         // Slave holding the word's low byte
  output byte_t                imm_b [NSLV],
  output logic                 send_req,
  output bus_cmd_t             send_cmd,
  output logic                 halted,
  output logic                 fetching,
  output logic                 hshift,       // a left-right register shift completes
  output logic                 vstart,       // first clock of an up-down transfer
  output logic                 vstep         // one up-down bit moves
);
  typedef enum logic [1:0] {S_IDLE, S_FETCH, S_EXEC} state_e;

  state_e                state;
  logic [PC_W-1:0]       pc, npc;
  logic [NSLV*8-1:0]     ibuf;
  addr_t                 itag;
  logic                  ibuf_ok;
  logic [4:0]            cyc, dur;
  logic                  fz, fc, fn_flag;
  uword_t                uw;
  logic                  live, last, vert, taken;

  assign uw   = pc[0] ? uword_t'(ibuf[127:64]) : uword_t'(ibuf[63:0]);
  assign live = (state == S_EXEC) && !steal;
  assign vert = (uw.src == SRC_N) || (uw.src == SRC_S);

  // Length of the current operation in clocks.
  always_comb begin
    dur = 5'd1;
    unique case (uw.op)
      OP_ALU: begin
        unique case (uw.src)
          SRC_OWN:      dur = 5'(MEM_CYC);
          SRC_W, SRC_E: dur = 5'(HSH_CYC);
          SRC_N, SRC_S: dur = 5'(MEM_CYC + 8 * VBIT_CYC + 1);
          default:      dur = 5'd1;
        endcase
      end
      OP_ST: dur = 5'(MEM_CYC);
      OP_SHIFT: begin
        if (uw.src == SRC_W || uw.src == SRC_E) dur = 5'(HSH_CYC);
        else if (vert)                          dur = 5'(8 * VBIT_CYC);
        else                                    dur = 5'd1;
      end
      default: dur = 5'd1;
    endcase
  end

  assign last = (uw.op == OP_SEND) ? (state == S_EXEC && send_gnt)
                                   : (live && cyc == dur - 5'd1);

  always_comb begin
    unique case (uw.op)
      OP_JMP:  taken = 1'b1;
      OP_BZ:   taken = fz;
      OP_BNZ:  taken = !fz;
      OP_BC:   taken = fc;
      OP_BN:   taken = fn_flag;
      default: taken = 1'b0;
    endcase
    npc = taken ? PC_W'(uw.addr) : pc + 1'b1;
  end

  // Slave control for this clock.
  always_comb begin
    ctl      = '0;
    ctl.fn   = uw.fn;
    ctl.fsel = F_OWN;
    ctl.osel = O_ROUTE;
    vstart   = 1'b0;
    hshift   = 1'b0;
    mem_we   = '0;
    if (state == S_EXEC) begin
      ctl.hdir_e = (uw.src == SRC_E);
      ctl.vdir_s = (uw.src == SRC_S);
      unique case (uw.op)
        OP_ALU: begin
          ctl.vsel_q = 1'b1;
          unique case (uw.src)
            SRC_W, SRC_E: ctl.fsel = F_HNB;
            SRC_N, SRC_S: ctl.fsel = F_Q;
            default:      ctl.fsel = F_OWN;
          endcase
          ctl.osel = (uw.src == SRC_IMM) ? O_IMM : O_ROUTE;
          ctl.a_we = last;
          if (vert && live) begin
            vstart     = (cyc == 5'd0);
            ctl.q_ld   = (cyc == 5'(MEM_CYC - 1));
            ctl.q_step = (cyc >= 5'(MEM_CYC)) && (cyc < 5'(MEM_CYC + 8 * VBIT_CYC)) &&
                         (((cyc - 5'(MEM_CYC)) % 5'(VBIT_CYC)) == 5'(VBIT_CYC - 1));
          end
        end
        OP_ST: begin
          if (last)
            for (int j = 0; j < NSLV; j++) mem_we[j] = mask[4'(j - int'(route))];
        end
        OP_SHIFT: begin
          if (uw.src == SRC_W || uw.src == SRC_E) begin
            ctl.osel = O_NBA;
            ctl.fn   = ALU_PASS;
            ctl.a_we = last;
            hshift   = last;
          end else if (vert && live) begin
            vstart     = (cyc == 5'd0);
            ctl.a_step = ((cyc % 5'(VBIT_CYC)) == 5'(VBIT_CYC - 1));
          end
        end
        default: ;
      endcase
    end
    vstep = ctl.q_step | ctl.a_step;
  end

  // Gang geometry and immediates.
  always_comb begin
    gang  = (state == S_EXEC) && uw.gang;
    mask  = '1;
    route = '0;
    top   = 4'd15;
    base  = 4'd0;
    if (uw.gang) begin
      base = uw.base;
      mask = '0;
      for (int i = 0; i < 4; i++)
        if (i <= int'(uw.wid)) mask[4'(int'(uw.base) + i)] = 1'b1;
      route = uw.mslv - uw.base;
      top   = uw.base + 4'(uw.wid);
    end
    for (int k = 0; k < NSLV; k++) begin
      if (!uw.gang)                     imm_b[k] = uw.imm[7:0];
      else if (4'(k) == uw.base)        imm_b[k] = uw.imm[7:0];
      else if (4'(k) == uw.base + 4'd1) imm_b[k] = uw.imm[15:8];
      else                              imm_b[k] = '0;
    end
  end

  assign mem_addr = (state == S_FETCH) ? pc[PC_W-1:1] : uw.addr;
  assign send_req = (state == S_EXEC) && (uw.op == OP_SEND);
  always_comb begin
    send_cmd       = '0;
    send_cmd.op    = BUS_WR;
    send_cmd.grp   = uw.tgrp;
    send_cmd.slv   = uw.tslv;
    send_cmd.addr  = uw.addr;
    send_cmd.data  = a_base;
  end
  assign halted   = (state == S_IDLE);
  assign fetching = (state == S_FETCH);

  always_ff @(posedge clk) begin
    if (rst) begin
      state   <= S_IDLE;
      pc      <= '0;
      cyc     <= '0;
      ibuf    <= '0;
      itag    <= '0;
      ibuf_ok <= 1'b0;
      fz      <= 1'b0;
      fc      <= 1'b0;
      fn_flag <= 1'b0;
    end else if (start) begin
      state   <= S_FETCH;
      pc      <= start_pc;
      cyc     <= '0;
      ibuf_ok <= 1'b0;
    end else begin
      unique case (state)
        S_FETCH: if (!steal) begin
          if (cyc == 5'(MEM_CYC - 1)) begin
            ibuf    <= ifetch;
            itag    <= pc[PC_W-1:1];
            ibuf_ok <= 1'b1;
            cyc     <= '0;
            state   <= S_EXEC;
          end else begin
            cyc <= cyc + 5'd1;
          end
        end
        S_EXEC: begin
          if (last) begin
            cyc <= '0;
            if (uw.op == OP_ALU) begin
              fz      <= alu_zero;
              fc      <= alu_cout;
              fn_flag <= alu_neg;
            end
            if (uw.op == OP_HALT) begin
              state <= S_IDLE;
            end else begin
              pc <= npc;
              if (ibuf_ok && npc[PC_W-1:1] == itag) state <= S_EXEC;
              else                                  state <= S_FETCH;
            end
          end else if (live) begin
            cyc <= cyc + 5'd1;
          end
        end
        default: ;
      endcase
    end
  end
endmodule
