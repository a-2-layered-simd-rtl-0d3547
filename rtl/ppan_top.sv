// ppan_top: the Parallel Pyramidal Array/Net - 16 Groups on a 4x4 grid,
// giving a 16x16 array of 8-bit Slaves (first layer, SIMD) and a 4x4 network
// of 16 Masters (second layer, MIMD) that share the Slaves' memories.
//
// Group g sits at grid row g/4, column g%4; Slave k of Group g is at array
// row 4*(g/4) + k/4, column 4*(g%4) + k%4. Every Slave is linked to its four
// nearest neighbours across Group boundaries as well as inside them; the
// array's outer edges go through ppan_border (image input, wrap-around or a
// constant). All Masters and the host share ppan_bus: the host loads
// programs and data, starts Groups (all in the same clock for whole-array
// SIMD work) and reads results; Masters write into other Groups' memories.
//
// Host interface: hold host_req with host_cmd for one clock per command
// (the host always wins the bus); a read returns on host_rdata with
// host_rvalid one clock later. img_in carries one image byte per array row
// and img_shift pulses each time the array shifts one column to the east,
// which is when the source should present the next column. halted[g] is high
// while Group g is stopped.
module ppan_top
  import ppan_pkg::*;
(
  input  logic            clk,
  input  logic            rst,
  input  logic            host_req,
  input  bus_cmd_t        host_cmd,
  output logic            host_gnt,
  output logic            host_rvalid,
  output byte_t           host_rdata,
  input  byte_t           img_in [ASIDE],
  output logic            img_shift,
  output logic [NGRP-1:0] halted
);
  // per-Group signals
  addr_t    daddr      [NGRP];
  byte_t    w_mem_out  [NGRP][SIDE];
  byte_t    e_mem_out  [NGRP][SIDE];
  byte_t    w_a_out    [NGRP][SIDE];
  byte_t    e_a_out    [NGRP][SIDE];
  logic     n_v_out    [NGRP][SIDE];
  logic     s_v_out    [NGRP][SIDE];
  byte_t    w_mem_in   [NGRP][SIDE];
  byte_t    e_mem_in   [NGRP][SIDE];
  byte_t    w_a_in     [NGRP][SIDE];
  byte_t    e_a_in     [NGRP][SIDE];
  logic     n_v_in     [NGRP][SIDE];
  logic     s_v_in     [NGRP][SIDE];
  logic     hshift     [NGRP];
  logic     vstart     [NGRP];
  logic     vstep      [NGRP];
  logic     send_req   [NGRP];
  bus_cmd_t send_cmd   [NGRP];
  logic     send_gnt   [NGRP];
  byte_t    grp_rdata  [NGRP];
  logic     tgt_sel    [NGRP];
  logic     start      [NGRP];

  // bus outputs
  logic            tgt_we;
  logic [3:0]      tgt_slv;
  addr_t           tgt_addr;
  byte_t           tgt_wdata;
  logic [PC_W-1:0] start_pc;
  logic            border_we;
  border_e         border_mode_in;
  byte_t           border_val_in;

  // array edges
  byte_t wedge_mem_o[ASIDE], wedge_a_o[ASIDE], eedge_mem_o[ASIDE], eedge_a_o[ASIDE];
  byte_t wedge_mem_i[ASIDE], wedge_a_i[ASIDE], eedge_mem_i[ASIDE], eedge_a_i[ASIDE];
  logic  nedge_v_o[ASIDE], sedge_v_o[ASIDE], nedge_v_i[ASIDE], sedge_v_i[ASIDE];
  logic  top_vstart[GSIDE], top_vstep[GSIDE], bot_vstart[GSIDE], bot_vstep[GSIDE];

  for (genvar g = 0; g < NGRP; g++) begin : g_grp
    localparam int GR = g / GSIDE;
    localparam int GC = g % GSIDE;
    localparam int GW = GR * GSIDE + (GC + GSIDE - 1) % GSIDE;
    localparam int GE = GR * GSIDE + (GC + 1) % GSIDE;
    localparam int GN = ((GR + GSIDE - 1) % GSIDE) * GSIDE + GC;
    localparam int GS = ((GR + 1) % GSIDE) * GSIDE + GC;

    for (genvar l = 0; l < SIDE; l++) begin : g_lane
      if (GC == 0) begin : g_w
        assign w_mem_in[g][l] = wedge_mem_i[GR*SIDE + l];
        assign w_a_in[g][l]   = wedge_a_i[GR*SIDE + l];
        assign wedge_mem_o[GR*SIDE + l] = w_mem_out[g][l];
        assign wedge_a_o[GR*SIDE + l]   = w_a_out[g][l];
      end else begin : g_wi
        assign w_mem_in[g][l] = e_mem_out[GW][l];
        assign w_a_in[g][l]   = e_a_out[GW][l];
      end
      if (GC == GSIDE - 1) begin : g_e
        assign e_mem_in[g][l] = eedge_mem_i[GR*SIDE + l];
        assign e_a_in[g][l]   = eedge_a_i[GR*SIDE + l];
        assign eedge_mem_o[GR*SIDE + l] = e_mem_out[g][l];
        assign eedge_a_o[GR*SIDE + l]   = e_a_out[g][l];
      end else begin : g_ei
        assign e_mem_in[g][l] = w_mem_out[GE][l];
        assign e_a_in[g][l]   = w_a_out[GE][l];
      end
      if (GR == 0) begin : g_n
        assign n_v_in[g][l] = nedge_v_i[GC*SIDE + l];
        assign nedge_v_o[GC*SIDE + l] = n_v_out[g][l];
      end else begin : g_ni
        assign n_v_in[g][l] = s_v_out[GN][l];
      end
      if (GR == GSIDE - 1) begin : g_s
        assign s_v_in[g][l] = sedge_v_i[GC*SIDE + l];
        assign sedge_v_o[GC*SIDE + l] = s_v_out[g][l];
      end else begin : g_si
        assign s_v_in[g][l] = n_v_out[GS][l];
      end
    end

    if (GR == 0) begin : g_top
      assign top_vstart[GC] = vstart[g];
      assign top_vstep[GC]  = vstep[g];
    end
    if (GR == GSIDE - 1) begin : g_bot
      assign bot_vstart[GC] = vstart[g];
      assign bot_vstep[GC]  = vstep[g];
    end

    ppan_group u_grp (
      .clk         (clk),
      .rst         (rst),
      .bus_sel     (tgt_sel[g]),
      .bus_we      (tgt_we),
      .bus_slv     (tgt_slv),
      .bus_addr    (tgt_addr),
      .bus_wdata   (tgt_wdata),
      .bus_rdata   (grp_rdata[g]),
      .start       (start[g]),
      .start_pc    (start_pc),
      .send_req    (send_req[g]),
      .send_cmd    (send_cmd[g]),
      .send_gnt    (send_gnt[g]),
      .halted      (halted[g]),
      .daddr       (daddr[g]),
      .addr_from_w (daddr[GW]),
      .addr_from_e (daddr[GE]),
      .w_mem_in    (w_mem_in[g]),
      .e_mem_in    (e_mem_in[g]),
      .w_mem_out   (w_mem_out[g]),
      .e_mem_out   (e_mem_out[g]),
      .w_a_in      (w_a_in[g]),
      .e_a_in      (e_a_in[g]),
      .w_a_out     (w_a_out[g]),
      .e_a_out     (e_a_out[g]),
      .n_v_in      (n_v_in[g]),
      .s_v_in      (s_v_in[g]),
      .n_v_out     (n_v_out[g]),
      .s_v_out     (s_v_out[g]),
      .hshift      (hshift[g]),
      .vstart      (vstart[g]),
      .vstep       (vstep[g]),
      .fetching    ()
    );
  end

  assign img_shift = hshift[0];

  ppan_bus u_bus (
    .clk         (clk),
    .rst         (rst),
    .host_req    (host_req),
    .host_cmd    (host_cmd),
    .host_gnt    (host_gnt),
    .host_rvalid (host_rvalid),
    .host_rdata  (host_rdata),
    .m_req       (send_req),
    .m_cmd       (send_cmd),
    .m_gnt       (send_gnt),
    .grp_rdata   (grp_rdata),
    .tgt_sel     (tgt_sel),
    .tgt_we      (tgt_we),
    .tgt_slv     (tgt_slv),
    .tgt_addr    (tgt_addr),
    .tgt_wdata   (tgt_wdata),
    .start       (start),
    .start_pc    (start_pc),
    .border_we   (border_we),
    .border_mode (border_mode_in),
    .border_val  (border_val_in)
  );

  ppan_border u_border (
    .clk         (clk),
    .rst         (rst),
    .we          (border_we),
    .mode_in     (border_mode_in),
    .val_in      (border_val_in),
    .mode        (),
    .val         (),
    .img_in      (img_in),
    .wedge_mem_o (wedge_mem_o),
    .wedge_a_o   (wedge_a_o),
    .eedge_mem_o (eedge_mem_o),
    .eedge_a_o   (eedge_a_o),
    .nedge_v_o   (nedge_v_o),
    .sedge_v_o   (sedge_v_o),
    .wedge_mem_i (wedge_mem_i),
    .wedge_a_i   (wedge_a_i),
    .eedge_mem_i (eedge_mem_i),
    .eedge_a_i   (eedge_a_i),
    .nedge_v_i   (nedge_v_i),
    .sedge_v_i   (sedge_v_i),
    .top_vstart  (top_vstart),
    .top_vstep   (top_vstep),
    .bot_vstart  (bot_vstart),
    .bot_vstep   (bot_vstep)
  );
endmodule
