// tb_ppan_group: one Group on its own. The testbench plays the common bus
// (loading data and a microprogram into the 16 memories, starting the Master,
// reading results) and the four neighbouring Groups (constant edge values).
// The program exercises SIMD operations with west (byte) and north
// (bit-serial) neighbour fetches, east and south register shifts, a 32-bit
// ganged add whose operands sit in other Slaves' memories, a 16-bit counted
// loop with a conditional branch, branches on carry and sign, and a SEND
// on the bus. A bus read in the middle of the run checks that stealing the
// memory port is harmless. All
// expected values are computed here from the array geometry.
module tb_ppan_group;
  import ppan_pkg::*;
  import tb_ppan_util::*;

  logic clk = 0, rst;
  logic bus_sel, bus_we, start, send_req, send_gnt, halted;
  logic [3:0] bus_slv;
  addr_t bus_addr, daddr, addr_from_w, addr_from_e;
  byte_t bus_wdata, bus_rdata;
  logic [PC_W-1:0] start_pc;
  bus_cmd_t send_cmd;
  byte_t w_mem_in[SIDE], e_mem_in[SIDE], w_mem_out[SIDE], e_mem_out[SIDE];
  byte_t w_a_in[SIDE], e_a_in[SIDE], w_a_out[SIDE], e_a_out[SIDE];
  logic n_v_in[SIDE], s_v_in[SIDE], n_v_out[SIDE], s_v_out[SIDE];
  logic hshift, vstart, vstep, fetching;

  ppan_group dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0, sends = 0;
  byte_t d0[NSLV], d1[NSLV], e201[NSLV];
  uword_t prog[$];

  task automatic check(string what, int got, int exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s got %h exp %h", what, got, exp);
    end
  endtask

  task automatic bus_write(int slv, int addr, byte_t d);
    @(negedge clk);
    bus_sel = 1; bus_we = 1; bus_slv = 4'(slv); bus_addr = addr_t'(addr); bus_wdata = d;
    @(negedge clk);
    bus_sel = 0; bus_we = 0;
  endtask

  task automatic bus_read(int slv, int addr, output byte_t d);
    @(negedge clk);
    bus_sel = 1; bus_we = 0; bus_slv = 4'(slv); bus_addr = addr_t'(addr);
    #1 d = bus_rdata;
    @(negedge clk);
    bus_sel = 0;
  endtask

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // bus grant for SEND after two clocks of waiting
  int wait_n;
  always @(posedge clk) begin
    if (rst) begin send_gnt <= 0; wait_n <= 0; end
    else if (send_req && !send_gnt) begin
      wait_n <= wait_n + 1;
      send_gnt <= (wait_n == 2);
    end else begin
      send_gnt <= 0; wait_n <= 0;
    end
    if (send_req && send_gnt) begin
      sends++;
      check("send grp", send_cmd.grp, 7);
      check("send slv", send_cmd.slv, 3);
      check("send addr", send_cmd.addr, 'h55);
      check("send data (low byte of loop sum)", send_cmd.data, 'h85);
    end
  end

  initial begin
    byte_t r;
    longint unsigned x, y, s;
    int cycles;
    rst = 1; bus_sel = 0; bus_we = 0; bus_slv = 0; bus_addr = 0; bus_wdata = 0; start = 0; start_pc = 0;
    addr_from_w = addr_t'('h100); addr_from_e = addr_t'('h101);
    for (int i = 0; i < SIDE; i++) begin
      w_mem_in[i] = byte_t'(8'h10 + i); e_mem_in[i] = 8'hEE;
      w_a_in[i] = 8'hAA; e_a_in[i] = byte_t'(8'h20 + i);
      n_v_in[i] = 1'b1; s_v_in[i] = 1'b0;
    end
    repeat (3) @(negedge clk);
    rst = 0;

    // data
    x = {$urandom, $urandom} & 64'hFFFF_FFFF;
    y = {$urandom, $urandom} & 64'hFFFF_FFFF;
    for (int k = 0; k < NSLV; k++) begin
      d0[k] = byte_t'($urandom);
      d1[k] = byte_t'($urandom);
      bus_write(k, 'h100, d0[k]);
      bus_write(k, 'h101, d1[k]);
    end
    for (int b = 0; b < 4; b++) begin
      bus_write(b, 'h300, byte_t'(x >> (8 * b)));
      bus_write(8 + b, 'h300, byte_t'(y >> (8 * b)));
    end

    bus_write(8, 'h3F0, 8'h00);
    bus_write(9, 'h3F1, 8'h00);
    bus_write(9, 'h3F2, 8'h00);
    // program
    prog.push_back(mk(OP_ALU, ALU_PASS, SRC_OWN, 'h100));                          // 0
    prog.push_back(mk(OP_ALU, ALU_ADD,  SRC_W,   'h101));                          // 1
    prog.push_back(mk(OP_ST,  ALU_PASS, SRC_OWN, 'h200));                          // 2
    prog.push_back(mk(OP_ALU, ALU_PASS, SRC_OWN, 'h100));                          // 3
    prog.push_back(mk(OP_ALU, ALU_SUB,  SRC_N,   'h101));                          // 4
    prog.push_back(mk(OP_ST,  ALU_PASS, SRC_OWN, 'h201));                          // 5
    prog.push_back(mk(OP_SHIFT, ALU_PASS, SRC_E));                                 // 6
    prog.push_back(mk(OP_ST,  ALU_PASS, SRC_OWN, 'h202));                          // 7
    prog.push_back(mk(OP_ALU, ALU_PASS, SRC_OWN, 'h100));                          // 8
    prog.push_back(mk(OP_SHIFT, ALU_PASS, SRC_S));                                 // 9
    prog.push_back(mk(OP_ST,  ALU_PASS, SRC_OWN, 'h203));                          // 10
    prog.push_back(mk(OP_ALU, ALU_PASS, SRC_OWN, 'h300, 0, 1, 3, 4, 0));           // 11 A4..7 = X
    prog.push_back(mk(OP_ALU, ALU_ADD,  SRC_OWN, 'h300, 0, 1, 3, 4, 8));           // 12 += Y
    prog.push_back(mk(OP_ST,  ALU_PASS, SRC_OWN, 'h301, 0, 1, 3, 4, 12));          // 13 -> mem 12..15
    prog.push_back(mk(OP_ALU, ALU_PASS, SRC_IMM, 0, 5, 1, 1, 0));                  // 14 count = 5
    prog.push_back(mk(OP_ALU, ALU_PASS, SRC_IMM, 0, 0, 1, 1, 2));                  // 15 sum = 0
    prog.push_back(mk(OP_ALU, ALU_ADD,  SRC_IMM, 0, 'h0181, 1, 1, 2));             // 16 sum += 0x181
    prog.push_back(mk(OP_ALU, ALU_SUB,  SRC_IMM, 0, 1, 1, 1, 0));                  // 17 count -= 1
    prog.push_back(mk(OP_BNZ, ALU_PASS, SRC_OWN, 'h90));                          // 18
    prog.push_back(mk(OP_ST,  ALU_PASS, SRC_OWN, 'h302, 0, 1, 1, 2, 2));           // 19
    prog.push_back(mk(.op(OP_SEND), .addr('h55), .gang(1), .wid(0), .base(2), .tgrp(7), .tslv(3))); // 20
    prog.push_back(mk(OP_ALU, ALU_PASS, SRC_IMM, 0, 'hF0, 1, 0, 8));               // 21
    prog.push_back(mk(OP_ALU, ALU_ADD,  SRC_IMM, 0, 'h20, 1, 0, 8));               // 22 carry out
    prog.push_back(mk(OP_BC,  ALU_PASS, SRC_OWN, 'h80 + 25));                      // 23 taken
    prog.push_back(mk(OP_ST,  ALU_PASS, SRC_OWN, 'h3F0, 0, 1, 0, 8, 8));           // 24 skipped
    prog.push_back(mk(OP_ALU, ALU_PASS, SRC_IMM, 0, 'h80, 1, 0, 9));               // 25 negative
    prog.push_back(mk(OP_BN,  ALU_PASS, SRC_OWN, 'h80 + 28));                      // 26 taken
    prog.push_back(mk(OP_ST,  ALU_PASS, SRC_OWN, 'h3F1, 0, 1, 0, 9, 9));           // 27 skipped
    prog.push_back(mk(OP_ALU, ALU_ADD,  SRC_IMM, 0, 'h01, 1, 0, 9));               // 28 no carry
    prog.push_back(mk(OP_BC,  ALU_PASS, SRC_OWN, 'h80 + 31));                      // 29 not taken
    prog.push_back(mk(OP_ST,  ALU_PASS, SRC_OWN, 'h3F2, 0, 1, 0, 9, 9));           // 30 stored
    prog.push_back(mk(OP_HALT));                                                   // 31
    foreach (prog[i])
      for (int b = 0; b < 8; b++) bus_write((i % 2) * 8 + b, 'h40 + i / 2, byte_t'(prog[i] >> (8 * b)));

    @(negedge clk); start = 1; start_pc = PC_W'('h80);
    @(negedge clk); start = 0;
    cycles = 0;
    repeat (30) @(negedge clk);
    bus_read(5, 'h100, r);                       // steal a clock while running
    check("bus read while running", r, d0[5]);
    while (!halted && cycles < 5000) begin @(negedge clk); cycles++; end
    check("halted", halted, 1);
    check("one SEND", sends, 1);

    // expected values
    for (int k = 0; k < NSLV; k++) begin
      int rr, c;
      rr = k / SIDE; c = k % SIDE;
      e201[k] = d0[k] - ((rr == 0) ? 8'hFF : d1[k - SIDE]);
    end
    for (int k = 0; k < NSLV; k++) begin
      int rr, c;
      rr = k / SIDE; c = k % SIDE;
      bus_read(k, 'h200, r);
      check($sformatf("west-fetch add, Slave %0d", k), r, byte_t'(d0[k] + ((c == 0) ? 8'h10 + rr : d1[k - 1])));
      bus_read(k, 'h201, r);
      check($sformatf("north-fetch sub, Slave %0d", k), r, e201[k]);
      bus_read(k, 'h202, r);
      check($sformatf("east shift, Slave %0d", k), r, (c == SIDE - 1) ? 8'h20 + rr : e201[k + 1]);
      bus_read(k, 'h203, r);
      check($sformatf("south shift, Slave %0d", k), r, (rr == SIDE - 1) ? 8'h00 : d0[k + SIDE]);
    end
    s = (x + y) & 64'hFFFF_FFFF;
    for (int b = 0; b < 4; b++) begin
      bus_read(12 + b, 'h301, r);
      check($sformatf("32-bit gang add byte %0d", b), r, byte_t'(s >> (8 * b)));
    end
    bus_read(8, 'h3F0, r);  check("BC taken on carry", r, 8'h00);
    bus_read(9, 'h3F1, r);  check("BN taken on negative", r, 8'h00);
    bus_read(9, 'h3F2, r);  check("BC not taken without carry", r, 8'h81);
    bus_read(2, 'h302, r);  check("loop sum low", r, 8'h85);
    bus_read(3, 'h302, r);  check("loop sum high", r, 8'h07);
    // port B: west edge memories read at the west neighbour's address
    for (int i = 0; i < SIDE; i++) begin
      check($sformatf("w_mem_out %0d", i), w_mem_out[i], d0[i * SIDE]);
      check($sformatf("e_mem_out %0d", i), e_mem_out[i], d1[i * SIDE + SIDE - 1]);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
