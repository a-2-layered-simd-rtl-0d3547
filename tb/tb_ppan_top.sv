// tb_ppan_top: the whole Array/Net at its full size (16 Groups, 256 Slaves,
// 16K bytes each), driven from the host side of the common bus.
//
//  1. SIMD, border "input": one program is broadcast into all 16 Groups and
//     all are started in the same clock. A 16x16 image is shifted in from the
//     left, one column per left-right shift, while the testbench plays the
//     camera and checks the shift timing. The program stores it, then adds
//     to each pixel its east neighbour (byte-wide fetch, across Group edges)
//     and its south neighbour (bit-serial fetch); the east and bottom edges
//     read the border value.
//  2. SIMD, border "wrap": west fetch, north fetch and a north register shift
//     with the array's opposite edges joined.
//  3. MIMD, border "constant": Groups 0, 5 and 10 run their own program as
//     Masters - 32-, 24-, 16- and 8-bit ganged arithmetic, a counted loop,
//     a fetch from the neighbouring Group's memory - and all three SEND to
//     other Groups over the bus in the same clock, so two must wait. The host
//     reads memory while they run, stealing memory cycles. Groups 1 and 2,
//     started in the same clock, run beside them as a SIMD sub-array.
// Every result is checked against values computed here. Each mechanism is
// counted and a mechanism that never happened counts as a failure.
module tb_ppan_top;
  import ppan_pkg::*;
  import tb_ppan_util::*;

  logic clk = 0, rst;
  logic host_req, host_gnt, host_rvalid, img_shift;
  bus_cmd_t host_cmd;
  byte_t host_rdata;
  byte_t img_in[ASIDE];
  logic [NGRP-1:0] halted;

  ppan_top dut (.*);
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  byte_t img[ASIDE][ASIDE];
  int cyc = 0;
  int shift_at[$];
  int n_contend = 0, n_steal = 0, n_fetch = 0, n_exec_clk = 0, n_vstep = 0;
  int img_col;

  task automatic check(string what, int got, int exp);
    checks++;
    if (got !== exp) begin
      failures++;
      if (failures < 30) $display("FAIL %s got %h exp %h", what, got, exp);
    end
  endtask

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // activity counters
  always @(posedge clk) begin
    cyc++;
    if (img_shift) shift_at.push_back(cyc);
    for (int g = 0; g < NGRP; g++) begin
      if (dut.send_req[g] && !dut.send_gnt[g]) n_contend++;
      if (dut.tgt_sel[g] && !halted[g]) n_steal++;
      if (dut.vstep[g]) n_vstep++;
    end
  end

  // camera: present column 15 - s of the image during shift s
  always @(posedge clk) begin
    if (img_shift) begin
      img_col <= img_col - 1;
      for (int r = 0; r < ASIDE; r++) img_in[r] <= (img_col >= 1) ? img[r][img_col - 1] : 8'h00;
    end
  end

  // array coordinates -> (group, slave)
  function automatic int grp_of(int r, int c); return (r / SIDE) * GSIDE + c / SIDE; endfunction
  function automatic int slv_of(int r, int c); return (r % SIDE) * SIDE + c % SIDE; endfunction

  task automatic host(bus_cmd_t c);
    @(negedge clk); host_req = 1; host_cmd = c;
    @(negedge clk); host_req = 0;
  endtask

  function automatic bus_cmd_t hc(bus_op_e op, int grp, int slv, int addr, int data, bit bc = 0);
    bus_cmd_t c;
    c = '0; c.op = op; c.grp = 4'(grp); c.slv = 4'(slv); c.addr = addr_t'(addr);
    c.data = byte_t'(data); c.bcast = bc;
    return c;
  endfunction

  task automatic rd(int grp, int slv, int addr, output byte_t d);
    @(negedge clk); host_req = 1; host_cmd = hc(BUS_RD, grp, slv, addr, 0);
    @(negedge clk); host_req = 0;
    #1 d = host_rdata;
    if (!host_rvalid) begin failures++; $display("FAIL no read data"); end
  endtask

  // load a program at microword index pc0 into one Group or all of them
  task automatic load(uword_t p[$], int pc0, int grp, bit bc);
    foreach (p[i])
      for (int b = 0; b < 8; b++)
        host(hc(BUS_WR, grp, ((pc0 + i) % 2) * 8 + b, (pc0 + i) / 2, int'(p[i] >> (8 * b)), bc));
  endtask

  task automatic wait_halt(logic [NGRP-1:0] which, int limit);
    int n = 0;
    while (((halted & which) != which) && n < limit) begin @(negedge clk); n++; end
    check("Groups halted", int'((halted & which) == which), 1);
  endtask

  initial begin
    uword_t p[$];
    byte_t d;
    int r, c, g, k;
    int t0, t1;
    int n_simd_groups;
    rst = 1; host_req = 0; host_cmd = '0;
    foreach (img_in[i]) img_in[i] = 0;
    for (int i = 0; i < ASIDE; i++) for (int j = 0; j < ASIDE; j++) img[i][j] = byte_t'($urandom);
    repeat (3) @(negedge clk);
    rst = 0;
    check("all Groups halted after reset", int'(halted), 16'hFFFF);

    // ---------------- 1. SIMD, image input ----------------
    host(hc(BUS_BORDER, 0, 0, int'(BRD_INPUT), 'h07));
    p.delete();
    for (int i = 0; i < 16; i++) p.push_back(mk(OP_SHIFT, ALU_PASS, SRC_W));
    p.push_back(mk(OP_ST,  ALU_PASS, SRC_OWN, 'h100));
    p.push_back(mk(OP_ALU, ALU_ADD,  SRC_E,   'h100));
    p.push_back(mk(OP_ST,  ALU_PASS, SRC_OWN, 'h101));
    p.push_back(mk(OP_ALU, ALU_PASS, SRC_OWN, 'h100));
    p.push_back(mk(OP_ALU, ALU_ADD,  SRC_S,   'h100));
    p.push_back(mk(OP_ST,  ALU_PASS, SRC_OWN, 'h102));
    p.push_back(mk(OP_HALT));
    load(p, 'h80, 0, 1);
    img_col = 15;
    for (int i = 0; i < ASIDE; i++) img_in[i] = img[i][15];
    shift_at.delete();
    host(hc(BUS_START, 0, 0, 'h80, 0, 1));
    check("broadcast start runs every Group", int'(halted), 0);
    wait_halt('1, 5000);
    // timing of the image input: 600 ns (3 clocks) per shift, plus the
    // 400 ns fetch of each new microword pair
    check("16 image shifts", shift_at.size(), 16);
    for (int i = 1; i < shift_at.size(); i++)
      check($sformatf("shift interval %0d", i), shift_at[i] - shift_at[i-1], (i % 2) ? HSH_CYC : HSH_CYC + MEM_CYC);
    if (shift_at.size() == 16)
      check("image load clocks (16 x 3 shifts + 7 fetches)", shift_at[15] - shift_at[0] + HSH_CYC, 16 * HSH_CYC + 7 * MEM_CYC);
    for (r = 0; r < ASIDE; r++)
      for (c = 0; c < ASIDE; c++) begin
        g = grp_of(r, c); k = slv_of(r, c);
        rd(g, k, 'h100, d);
        check($sformatf("image (%0d,%0d)", r, c), d, img[r][c]);
        rd(g, k, 'h101, d);
        check($sformatf("east sum (%0d,%0d)", r, c), d, byte_t'(img[r][c] + ((c == 15) ? 8'h07 : img[r][c+1])));
        rd(g, k, 'h102, d);
        check($sformatf("south sum (%0d,%0d)", r, c), d, byte_t'(img[r][c] + ((r == 15) ? 8'h07 : img[r+1][c])));
      end

    // ---------------- 2. SIMD, wrap-around ----------------
    host(hc(BUS_BORDER, 0, 0, int'(BRD_WRAP), 'h00));
    p.delete();
    p.push_back(mk(OP_ALU, ALU_PASS, SRC_OWN, 'h100));
    p.push_back(mk(OP_ALU, ALU_ADD,  SRC_W,   'h100));
    p.push_back(mk(OP_ST,  ALU_PASS, SRC_OWN, 'h103));
    p.push_back(mk(OP_ALU, ALU_PASS, SRC_OWN, 'h100));
    p.push_back(mk(OP_ALU, ALU_SUB,  SRC_N,   'h100));
    p.push_back(mk(OP_ST,  ALU_PASS, SRC_OWN, 'h104));
    p.push_back(mk(OP_ALU, ALU_PASS, SRC_OWN, 'h100));
    p.push_back(mk(OP_SHIFT, ALU_PASS, SRC_N));
    p.push_back(mk(OP_ST,  ALU_PASS, SRC_OWN, 'h105));
    p.push_back(mk(OP_HALT));
    load(p, 'hC0, 0, 1);
    host(hc(BUS_START, 0, 0, 'hC0, 0, 1));
    wait_halt('1, 5000);
    for (r = 0; r < ASIDE; r++)
      for (c = 0; c < ASIDE; c++) begin
        g = grp_of(r, c); k = slv_of(r, c);
        rd(g, k, 'h103, d);
        check($sformatf("wrap west sum (%0d,%0d)", r, c), d, byte_t'(img[r][c] + img[r][(c + 15) % 16]));
        rd(g, k, 'h104, d);
        check($sformatf("wrap north diff (%0d,%0d)", r, c), d, byte_t'(img[r][c] - img[(r + 15) % 16][c]));
        rd(g, k, 'h105, d);
        check($sformatf("wrap north shift (%0d,%0d)", r, c), d, img[(r + 15) % 16][c]);
      end

    // ---------------- 3. MIMD Masters ----------------
    host(hc(BUS_BORDER, 0, 0, int'(BRD_CONST), 'h00));
    p.delete();
    p.push_back(mk(OP_HALT));
    load(p, 'hE0, 0, 1);                                // idle Groups stop at once
    host(hc(BUS_WR, 4, 3, 'h310, 'h9D));                // west neighbour of Group 5
    host(hc(BUS_WR, 9, 3, 'h310, 'h6B));                // west neighbour of Group 10
    foreach (mimd_grp[i]) begin
      g = mimd_grp[i];
      for (int b = 0; b < 4; b++) begin
        host(hc(BUS_WR, g, 4 + b, 'h300, int'(mx[i] >> (8 * b))));
        host(hc(BUS_WR, g, 8 + b, 'h300, int'(my[i] >> (8 * b))));
      end
      for (int b = 0; b < 3; b++) host(hc(BUS_WR, g, b, 'h302, int'(mz[i] >> (8 * b))));
      p.delete();
      p.push_back(mk(OP_ALU, ALU_PASS, SRC_OWN, 'h300, 0, 1, 3, 0, 4));       // 32-bit X
      p.push_back(mk(OP_ALU, ALU_ADD,  SRC_OWN, 'h300, 0, 1, 3, 0, 8));       // + Y
      p.push_back(mk(OP_ST,  ALU_PASS, SRC_OWN, 'h301, 0, 1, 3, 0, 12));
      p.push_back(mk(OP_ALU, ALU_PASS, SRC_OWN, 'h302, 0, 1, 2, 8, 0));       // 24-bit Z
      p.push_back(mk(OP_ALU, ALU_ADD,  SRC_IMM, 0, 'hFFFF, 1, 2, 8));         // + 0x00FFFF
      p.push_back(mk(OP_ST,  ALU_PASS, SRC_OWN, 'h303, 0, 1, 2, 8, 0));
      p.push_back(mk(OP_ALU, ALU_PASS, SRC_IMM, 0, 3, 1, 1, 4));              // 16-bit count
      p.push_back(mk(OP_ALU, ALU_PASS, SRC_IMM, 0, 0, 1, 0, 6));              // 8-bit sum
      p.push_back(mk(OP_ALU, ALU_ADD,  SRC_IMM, 0, 'h11, 1, 0, 6));           // loop: sum += 0x11
      p.push_back(mk(OP_ALU, ALU_SUB,  SRC_IMM, 0, 1, 1, 1, 4));              //       count -= 1
      p.push_back(mk(OP_BNZ, ALU_PASS, SRC_OWN, 'hE0 + 8));
      p.push_back(mk(OP_ALU, ALU_PASS, SRC_W,   'h310, 0, 1, 0, 0, 0));       // neighbour Group's memory
      p.push_back(mk(OP_ST,  ALU_PASS, SRC_OWN, 'h311, 0, 1, 0, 0, 0));
      p.push_back(mk(.op(OP_SEND), .addr('h380 + i), .gang(1), .base(6), .tgrp((g + 1) % NGRP), .tslv(2)));
      p.push_back(mk(OP_HALT));
      load(p, 'hE0, g, 0);
    end
    // Groups 1 and 2 form a SIMD sub-array running beside the three Masters
    p.delete();
    p.push_back(mk(OP_ALU, ALU_PASS, SRC_OWN, 'h100));
    p.push_back(mk(OP_ALU, ALU_ADD,  SRC_E,   'h100));
    p.push_back(mk(OP_ST,  ALU_PASS, SRC_OWN, 'h106));
    p.push_back(mk(OP_HALT));
    load(p, 'hE0, 1, 0);
    load(p, 'hE0, 2, 0);
    begin
      bus_cmd_t sc;
      sc = hc(BUS_START, 0, 0, 'hE0, 0);
      sc.gmask = 16'b0000_0100_0010_0111;              // Groups 0, 1, 2, 5, 10
      host(sc);
    end
    check("a set of five Groups started in one clock", int'(halted), 16'b1111_1011_1101_1000);
    repeat (6) @(negedge clk);
    rd(5, 4, 'h300, d);                                 // read while Masters run
    check("host read during MIMD run", d, byte_t'(mx[1]));
    rd(10, 9, 'h300, d);
    check("host read during MIMD run", d, byte_t'(my[2] >> 8));
    wait_halt('1, 5000);
    foreach (mimd_grp[i]) begin
      longint unsigned s;
      g = mimd_grp[i];
      s = (mx[i] + my[i]) & 32'hFFFF_FFFF;
      for (int b = 0; b < 4; b++) begin
        rd(g, 12 + b, 'h301, d);
        check($sformatf("G%0d 32-bit sum byte %0d", g, b), d, byte_t'(s >> (8 * b)));
      end
      s = (mz[i] + 24'h00FFFF) & 24'hFF_FFFF;
      for (int b = 0; b < 3; b++) begin
        rd(g, b, 'h303, d);
        check($sformatf("G%0d 24-bit sum byte %0d", g, b), d, byte_t'(s >> (8 * b)));
      end
      rd(g, 0, 'h311, d);
      check($sformatf("G%0d fetch from west Group", g), d, (g == 5) ? 8'h9D : (g == 10) ? 8'h6B : 8'h00);
      rd((g + 1) % NGRP, 2, 'h380 + i, d);
      check($sformatf("G%0d loop sum sent over the bus", g), d, 8'h33);
    end

    for (r = 0; r < SIDE; r++)                          // Groups 1, 2 = rows 0..3, columns 4..11
      for (c = SIDE; c < 3 * SIDE; c++) begin
        rd(grp_of(r, c), slv_of(r, c), 'h106, d);
        check($sformatf("sub-array east sum (%0d,%0d)", r, c), d, byte_t'(img[r][c] + img[r][c+1]));
      end

    // ---------------- mechanisms ----------------
    $display("mechanisms: image shifts=%0d bus waits=%0d stolen clocks=%0d up-down bit steps=%0d",
             shift_at.size(), n_contend, n_steal, n_vstep);
    check("image shifting happened", int'(shift_at.size() > 0), 1);
    check("bus contention happened", int'(n_contend >= 1), 1);
    check("memory cycle stealing happened", int'(n_steal > 0), 1);
    check("up-down bit-serial transfer happened", int'(n_vstep > 0), 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int mimd_grp[3] = '{0, 5, 10};
  longint unsigned mx[3], my[3], mz[3];
  initial
    for (int i = 0; i < 3; i++) begin
      mx[i] = {32'h0, $urandom};
      my[i] = {32'h0, $urandom};
      mz[i] = {40'h0, 24'($urandom)};
    end
endmodule
