// ppan_bus: the common bus that joins the 16 Masters to each other and to
// the host computer.
//
// One command moves per clock. The host has priority; the Masters share the
// rest round-robin, and a Master whose request is not granted simply waits
// (its sequencer holds the SEND). A granted command acts in the same clock:
//   BUS_WR     writes a byte into one Slave memory of one Group, or of every
//              Group when bcast is set (the host loading the program that
//              each Group must hold its own copy of)
//   BUS_RD     reads a byte; host_rdata is valid on the next clock
//   BUS_START  starts one Group, a set of Groups (gmask) or all of them in
//              the same clock, at a microword address: Groups started
//              together run one program in lockstep as a SIMD (sub-)array
//   BUS_BORDER sets the array border mode and value
// A Group addressed by WR or RD gives its memory port to the bus for that
// clock. The document gives only that the Masters share a bus that reaches
// the host; the command set and arbitration are this design's choices.
module ppan_bus
  import ppan_pkg::*;
(
  input  logic            clk,
  input  logic            rst,
  input  logic            host_req,
  input  bus_cmd_t        host_cmd,
  output logic            host_gnt,
  output logic            host_rvalid,
  output byte_t           host_rdata,
  input  logic            m_req [NGRP],
  input  bus_cmd_t        m_cmd [NGRP],
  output logic            m_gnt [NGRP],
  input  byte_t           grp_rdata [NGRP],
  output logic            tgt_sel [NGRP],
  output logic            tgt_we,
  output logic [3:0]      tgt_slv,
  output addr_t           tgt_addr,
  output byte_t           tgt_wdata,
  output logic            start [NGRP],
  output logic [PC_W-1:0] start_pc,
  output logic            border_we,
  output border_e         border_mode,
  output byte_t           border_val
);
  logic [3:0] rr;          // Master with the highest priority next
  logic       m_any;
  logic [3:0] m_win;
  bus_cmd_t   cmd;
  logic       active;

  always_comb begin
    m_any = 1'b0;
    m_win = '0;
    for (int i = NGRP - 1; i >= 0; i--) begin
      if (m_req[4'(int'(rr) + i)]) begin
        m_any = 1'b1;
        m_win = 4'(int'(rr) + i);
      end
    end
  end

  always_comb begin
    host_gnt = host_req;
    for (int g = 0; g < NGRP; g++) m_gnt[g] = !host_req && m_any && (m_win == 4'(g));
    cmd    = host_req ? host_cmd : m_cmd[m_win];
    active = host_req || m_any;
  end

  always_comb begin
    for (int g = 0; g < NGRP; g++) begin
      tgt_sel[g] = active && (cmd.op == BUS_WR || cmd.op == BUS_RD) &&
                   (cmd.grp == 4'(g) || (cmd.bcast && cmd.op == BUS_WR));
      start[g]   = active && cmd.op == BUS_START &&
                   (cmd.bcast || ((cmd.gmask == '0) ? (cmd.grp == 4'(g)) : cmd.gmask[g]));
    end
  end

  assign tgt_we      = active && cmd.op == BUS_WR;
  assign tgt_slv     = cmd.slv;
  assign tgt_addr    = cmd.addr;
  assign tgt_wdata   = cmd.data;
  assign start_pc    = PC_W'(cmd.addr);
  assign border_we   = active && cmd.op == BUS_BORDER;
  assign border_mode = border_e'(cmd.addr[1:0]);
  assign border_val  = cmd.data;

  always_ff @(posedge clk) begin
    if (rst) begin
      rr          <= '0;
      host_rvalid <= 1'b0;
      host_rdata  <= '0;
    end else begin
      host_rvalid <= host_req && host_cmd.op == BUS_RD;
      if (host_req && host_cmd.op == BUS_RD) begin
        host_rdata <= grp_rdata[host_cmd.grp];
      end
      if (!host_req && m_any) rr <= m_win + 4'd1;
    end
  end

  // A Master may only write; a read request from one is a programming error.
  always @(posedge clk) begin
    if (!rst && !host_req && m_any)
      assert (m_cmd[m_win].op == BUS_WR) else $error("Master bus command other than write");
  end
endmodule
