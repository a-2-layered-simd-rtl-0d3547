// tb_master_seq: runs a short microprogram through the Master sequencer
// with a behavioural program memory and checks, clock by clock, when each
// Slave strobe fires: fetch (2 clocks), own-memory ALU (2), left-right
// transfer (3, 600 ns), up-down transfer (8 bits x 2 clocks), store routing
// of a ganged word, a taken branch, a SEND held until the bus grants, the
// pair buffer (no fetch for the second word of a pair) and a bus steal that
// freezes the sequencer for exactly the stolen clocks.
module tb_master_seq;
  import ppan_pkg::*;
  import tb_ppan_util::*;

  logic clk = 0, rst, start, steal, alu_zero, alu_cout, alu_neg, send_gnt;
  logic [PC_W-1:0] start_pc;
  logic [NSLV*8-1:0] ifetch;
  byte_t a_base;
  addr_t mem_addr;
  slave_ctl_t ctl;
  logic [NSLV-1:0] mask, mem_we;
  logic [3:0] route, top, base;
  logic gang, send_req, halted, fetching, hshift, vstart, vstep;
  byte_t imm_b [NSLV];
  bus_cmd_t send_cmd;

  logic [127:0] pmem [64];
  int checks = 0, failures = 0;
  int cyc;
  int awe_at[$], qstep_at[$];
  int n_astep, n_qld, n_vstart, n_hshift, n_fetch, n_memwe, n_req;

  master_seq dut (.*);

  always #5 clk = ~clk;
  assign ifetch   = pmem[mem_addr[5:0]];
  assign alu_zero = (ctl.osel == O_IMM);
  assign alu_cout = 1'b0;
  assign alu_neg  = 1'b0;
  assign a_base   = 8'h77;

  task automatic check(string what, int got, int exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s got %0d exp %0d", what, got, exp);
    end
  endtask

  task automatic put(int i, uword_t w);
    pmem[i / 2][(i % 2) * 64 +: 64] = w;
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // event log, in clocks since start
  always @(posedge clk) begin
    if (!halted) begin
      if (ctl.a_we && mask[0]) awe_at.push_back(cyc);
      if (ctl.q_step) qstep_at.push_back(cyc);
      n_astep  += int'(ctl.a_step);
      n_qld    += int'(ctl.q_ld);
      n_vstart += int'(vstart);
      n_hshift += int'(hshift);
      n_fetch  += int'(fetching && !steal);
      n_req    += int'(send_req);
      if (mem_we != 0) begin
        n_memwe++;
        check("store routes to memories 5,6", int'(mem_we), 16'h0060);
        check("gang mask 2,3", int'(mask), 16'h000C);
        check("route", int'(route), 3);
      end
      if (send_req && send_gnt) begin
        check("send grp", int'(send_cmd.grp), 3);
        check("send slv", int'(send_cmd.slv), 4);
        check("send addr", int'(send_cmd.addr), 'h123);
        check("send data", int'(send_cmd.data), 'h77);
      end
      cyc++;
    end
  end

  // grant a SEND after it has waited 5 clocks
  always @(posedge clk) begin
    if (rst) send_gnt <= 0;
    else send_gnt <= send_req && !send_gnt && n_req == 5;
  end

  task automatic run(int steal_at, int steal_n, output int total);
    cyc = 0; n_astep = 0; n_qld = 0; n_vstart = 0; n_hshift = 0; n_fetch = 0; n_memwe = 0; n_req = 0;
    awe_at.delete(); qstep_at.delete();
    @(negedge clk) start = 1;
    @(negedge clk) start = 0;
    while (halted == 0) begin
      steal = (cyc >= steal_at && cyc < steal_at + steal_n);
      @(negedge clk);
    end
    steal = 0;
    total = cyc;
  endtask

  initial begin
    int total;
    int exp_awe[5] = '{3, 6, 27, 30, 53};
    foreach (pmem[i]) pmem[i] = '0;
    put(0,  mk(OP_ALU,   ALU_ADD,  SRC_OWN, 5));
    put(1,  mk(OP_ALU,   ALU_PASS, SRC_W,   6));
    put(2,  mk(OP_ALU,   ALU_PASS, SRC_N,   7));
    put(3,  mk(OP_SHIFT, ALU_PASS, SRC_E));
    put(4,  mk(OP_SHIFT, ALU_PASS, SRC_S));
    put(5,  mk(.op(OP_ST), .addr(9), .gang(1), .wid(1), .base(2), .mslv(5)));
    put(6,  mk(OP_ALU,   ALU_ADD,  SRC_IMM, 0, 'h12));
    put(7,  mk(OP_BZ,    ALU_PASS, SRC_OWN, 10));
    put(8,  mk(OP_HALT));
    put(9,  mk(OP_HALT));
    put(10, mk(.op(OP_SEND), .addr('h123), .tgrp(3), .tslv(4)));
    put(11, mk(OP_JMP,   ALU_PASS, SRC_OWN, 13));
    put(12, mk(OP_HALT));
    put(13, mk(OP_HALT));
    rst = 1; start = 0; start_pc = '0; steal = 0;
    repeat (3) @(negedge clk);
    rst = 0;
    check("halted after reset", halted, 1);

    run(1000, 0, total);
    check("program length in clocks", total, 62 + 5);
    check("a_we count", awe_at.size(), 5);
    foreach (exp_awe[i]) if (i < awe_at.size()) check($sformatf("a_we %0d clock", i), awe_at[i], exp_awe[i]);
    check("q_step count", qstep_at.size(), 8);
    foreach (qstep_at[i]) check($sformatf("q_step %0d clock", i), qstep_at[i], 12 + 2 * i);
    check("a_step count", n_astep, 8);
    check("q_ld count", n_qld, 1);
    check("vstart count", n_vstart, 2);
    check("hshift count", n_hshift, 1);
    check("fetch clocks", n_fetch, 12);
    check("store count", n_memwe, 1);

    // the same run with 5 clocks stolen by the bus in the middle of the up-down fetch
    run(15, 5, total);
    check("program length with 5 stolen clocks", total, 62 + 5 + 5);
    check("q_step count with steal", qstep_at.size(), 8);
    check("a_we count with steal", awe_at.size(), 5);

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
