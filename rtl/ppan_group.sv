// ppan_group: one Group - a 4x4 array of 8-bit Slaves, their 16K-byte
// memories and the Master sequencer, i.e. one board of the machine.
//
// Slave k sits at row k/4, column k%4. Inside the Group each Slave sees the
// memory (port A, at the Group's address) and the A register of its west and
// east neighbours, and the vertical shift bit of its north and south
// neighbours. At the Group's edges these come from the ports below, which the
// top level wires to the neighbouring Groups or to the array border:
//   *_mem_in  neighbour Group's edge memories read at this Group's address
//   *_mem_out this Group's edge memories read at the neighbour's address
//             (addr_from_w / addr_from_e), through port B of each memory
//   *_a_in/out   A registers for left-right register shifts
//   *_v_in/out   one-bit up-down shift lines
// A byte router gives Slave k the fetched byte of Slave k+route, which lets a
// Master word read from and store into any of the 16 memories; the carry of
// Slave k-1 feeds Slave k inside a gang. The common bus (bus_sel) takes port A
// of all 16 memories for one clock and freezes the Master for that clock.
// What the board holds follows the document; ports and timing are this
// design's own.
module ppan_group
  import ppan_pkg::*;
(
  input  logic            clk,
  input  logic            rst,
  // common bus, as a target
  input  logic            bus_sel,
  input  logic            bus_we,
  input  logic [3:0]      bus_slv,
  input  addr_t           bus_addr,
  input  byte_t           bus_wdata,
  output byte_t           bus_rdata,
  input  logic            start,
  input  logic [PC_W-1:0] start_pc,
  // common bus, as a Master sending
  output logic            send_req,
  output bus_cmd_t        send_cmd,
  input  logic            send_gnt,
  output logic            halted,
  // neighbour links (index = row for west/east, column for north/south)
  output addr_t           daddr,
  input  addr_t           addr_from_w,
  input  addr_t           addr_from_e,
  input  byte_t           w_mem_in  [SIDE],
  input  byte_t           e_mem_in  [SIDE],
  output byte_t           w_mem_out [SIDE],
  output byte_t           e_mem_out [SIDE],
  input  byte_t           w_a_in    [SIDE],
  input  byte_t           e_a_in    [SIDE],
  output byte_t           w_a_out   [SIDE],
  output byte_t           e_a_out   [SIDE],
  input  logic            n_v_in    [SIDE],
  input  logic            s_v_in    [SIDE],
  output logic            n_v_out   [SIDE],
  output logic            s_v_out   [SIDE],
  // activity, for the border and the image source
  output logic            hshift,
  output logic            vstart,
  output logic            vstep,
  output logic            fetching
);
  slave_ctl_t       ctl;
  addr_t            m_addr;
  logic [NSLV-1:0]  mask, mem_we;
  logic [3:0]       route, top, base;
  logic             gang;
  byte_t            imm_b [NSLV];
  byte_t            rdata [NSLV];
  byte_t            nbdata[NSLV];
  byte_t            a     [NSLV];
  byte_t            y     [NSLV];
  byte_t            fetched[NSLV];
  logic [NSLV-1:0]  v_out, yzero;
  logic             cout [NSLV];
  logic             cin  [NSLV];
  logic [NSLV*8-1:0] ifetch;
  logic             cin0;

  assign cin0  = (ctl.fn == ALU_SUB);
  assign daddr = m_addr;

  for (genvar k = 0; k < NSLV; k++) begin : g_slv
    localparam int R = k / SIDE;
    localparam int C = k % SIDE;
    byte_t w_mem, e_mem, w_a, e_a;
    logic  n_v, s_v;
    addr_t nb_addr;

    if (C == 0) begin : g_w
      assign w_mem = w_mem_in[R];
      assign w_a   = w_a_in[R];
      assign nb_addr = addr_from_w;
      assign w_mem_out[R] = nbdata[k];
      assign w_a_out[R]   = a[k];
    end else begin : g_wi
      assign w_mem = rdata[k-1];
      assign w_a   = a[k-1];
    end
    if (C == SIDE - 1) begin : g_e
      assign e_mem = e_mem_in[R];
      assign e_a   = e_a_in[R];
      assign nb_addr = addr_from_e;
      assign e_mem_out[R] = nbdata[k];
      assign e_a_out[R]   = a[k];
    end else begin : g_ei
      assign e_mem = rdata[k+1];
      assign e_a   = a[k+1];
    end
    if (C != 0 && C != SIDE - 1) begin : g_nbi
      assign nb_addr = m_addr;
    end
    if (R == 0) begin : g_n
      assign n_v = n_v_in[C];
      assign n_v_out[C] = v_out[k];
    end else begin : g_ni
      assign n_v = v_out[k-SIDE];
    end
    if (R == SIDE - 1) begin : g_s
      assign s_v = s_v_in[C];
      assign s_v_out[C] = v_out[k];
    end else begin : g_si
      assign s_v = v_out[k+SIDE];
    end

    // carry chain inside a gang
    if (k == 0) begin : g_c0
      assign cin[k] = cin0;
    end else begin : g_cn
      assign cin[k] = (gang && mask[k] && (4'(k) != base)) ? cout[k-1] : cin0;
    end

    slave_mem u_mem (
      .clk      (clk),
      .we       (bus_sel ? (bus_we && bus_slv == 4'(k)) : mem_we[k]),
      .addr     (bus_sel ? bus_addr : m_addr),
      .wdata    (bus_sel ? bus_wdata : a[(k + NSLV - int'(route)) % NSLV]),
      .rdata    (rdata[k]),
      .nb_addr  (nb_addr),
      .nb_rdata (nbdata[k])
    );

    slave_pe u_pe (
      .clk       (clk),
      .rst       (rst),
      .ctl       (bus_sel ? slave_ctl_t'('0) : ctl),
      .en        (mask[k]),
      .mem_rdata (rdata[k]),
      .w_mem     (w_mem),
      .e_mem     (e_mem),
      .w_a       (w_a),
      .e_a       (e_a),
      .n_v       (n_v),
      .s_v       (s_v),
      .routed    (fetched[(k + int'(route)) % NSLV]),
      .imm       (imm_b[k]),
      .cin       (cin[k]),
      .fetched   (fetched[k]),
      .a         (a[k]),
      .y         (y[k]),
      .cout      (cout[k]),
      .v_out     (v_out[k])
    );

    assign ifetch[k*8 +: 8] = rdata[k];
    assign yzero[k] = (y[k] == '0) || !mask[k];
  end

  assign bus_rdata = rdata[bus_slv];

  master_seq u_seq (
    .clk      (clk),
    .rst      (rst),
    .start    (start),
    .start_pc (start_pc),
    .steal    (bus_sel),
    .ifetch   (ifetch),
    .alu_zero (&yzero),
    .alu_cout (cout[top]),
    .alu_neg  (y[top][7]),
    .a_base   (a[base]),
    .send_gnt (send_gnt),
    .mem_addr (m_addr),
    .ctl      (ctl),
    .mask     (mask),
    .mem_we   (mem_we),
    .route    (route),
    .gang     (gang),
    .top      (top),
    .base     (base),
    .imm_b    (imm_b),
    .send_req (send_req),
    .send_cmd (send_cmd),
    .halted   (halted),
    .fetching (fetching),
    .hshift   (hshift),
    .vstart   (vstart),
    .vstep    (vstep)
  );
endmodule
