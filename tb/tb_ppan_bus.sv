// tb_ppan_bus: checks the common bus - host commands (write, broadcast
// write, read with one clock of latency, start, broadcast start, border),
// host priority over the Masters, and round-robin service of Masters that
// request together, against a reference arbiter kept in the testbench.
module tb_ppan_bus;
  import ppan_pkg::*;
  logic clk = 0, rst;
  logic host_req, host_gnt, host_rvalid, tgt_we, border_we;
  bus_cmd_t host_cmd;
  byte_t host_rdata, tgt_wdata, border_val;
  logic m_req[NGRP], m_gnt[NGRP], tgt_sel[NGRP], start[NGRP];
  bus_cmd_t m_cmd[NGRP];
  byte_t grp_rdata[NGRP];
  logic [3:0] tgt_slv;
  addr_t tgt_addr;
  logic [PC_W-1:0] start_pc;
  border_e border_mode;
  int checks = 0, failures = 0;

  ppan_bus dut (.*);
  always #5 clk = ~clk;

  task automatic check(string what, int got, int exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s got %h exp %h", what, got, exp);
    end
  endtask

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic bus_cmd_t cmd(bus_op_e op, int grp, int slv, int addr, int data, bit bc = 0);
    bus_cmd_t c;
    c = '0; c.op = op; c.grp = 4'(grp); c.slv = 4'(slv); c.addr = addr_t'(addr);
    c.data = byte_t'(data); c.bcast = bc;
    return c;
  endfunction

  initial begin
    int nsel, nstart, rr, served[NGRP], pending[NGRP], left, got, winner;
    rst = 1; host_req = 0; host_cmd = '0;
    for (int g = 0; g < NGRP; g++) begin
      m_req[g] = 0; m_cmd[g] = cmd(BUS_WR, (g + 1) % NGRP, g, 'h10 + g, 'hA0 + g);
      grp_rdata[g] = byte_t'(8'h30 + g);
    end
    repeat (2) @(negedge clk);
    rst = 0;

    // host write to group 9
    host_req = 1; host_cmd = cmd(BUS_WR, 9, 3, 'h1234, 'h5C);
    #1;
    nsel = 0; foreach (tgt_sel[g]) nsel += int'(tgt_sel[g]);
    check("write selects one group", nsel, 1);
    check("write selects group 9", tgt_sel[9], 1);
    check("write enable", tgt_we, 1);
    check("write slave", tgt_slv, 3);
    check("write addr", tgt_addr, 'h1234);
    check("write data", tgt_wdata, 'h5C);
    check("host granted", host_gnt, 1);
    // broadcast write
    @(negedge clk); host_cmd = cmd(BUS_WR, 0, 1, 'h20, 'h11, 1);
    #1;
    nsel = 0; foreach (tgt_sel[g]) nsel += int'(tgt_sel[g]);
    check("broadcast write selects all", nsel, NGRP);
    // read from group 6: data one clock later
    @(negedge clk); host_cmd = cmd(BUS_RD, 6, 0, 'h20, 0);
    #1;
    check("read selects group 6", tgt_sel[6], 1);
    check("read does not write", tgt_we, 0);
    @(negedge clk); host_req = 0;
    #1;
    check("rvalid", host_rvalid, 1);
    check("rdata", host_rdata, 'h36);
    @(negedge clk); #1 check("rvalid drops", host_rvalid, 0);
    // start one, then all
    host_req = 1; host_cmd = cmd(BUS_START, 4, 0, 'h77, 0);
    #1;
    nstart = 0; foreach (start[g]) nstart += int'(start[g]);
    check("start one", nstart, 1);
    check("start group 4", start[4], 1);
    check("start pc", start_pc, 'h77);
    @(negedge clk); host_cmd = cmd(BUS_START, 0, 0, 'h5, 0, 1);
    #1;
    nstart = 0; foreach (start[g]) nstart += int'(start[g]);
    check("start all", nstart, NGRP);
    @(negedge clk); host_cmd = cmd(BUS_START, 3, 0, 'h9, 0); host_cmd.gmask = 16'h8421;
    #1;
    nstart = 0; foreach (start[g]) nstart += int'(start[g]);
    check("start a set of four", nstart, 4);
    check("set includes Group 10", start[10], 1);
    check("set ignores grp", start[3], 0);
    @(negedge clk); host_cmd = cmd(BUS_BORDER, 0, 0, int'(BRD_WRAP), 'h42);
    #1;
    check("border we", border_we, 1);
    check("border mode", border_mode, BRD_WRAP);
    check("border value", border_val, 'h42);
    @(negedge clk); host_req = 0;

    // Masters 2, 5, 11 and 14 request together; the host cuts in once
    pending = '{default: 0};
    foreach (pending[g]) served[g] = 0;
    pending[2] = 1; pending[5] = 1; pending[11] = 1; pending[14] = 1;
    left = 4; rr = 0;
    for (int cyc = 0; cyc < 12 && left > 0; cyc++) begin
      foreach (m_req[g]) m_req[g] = pending[g] != 0;
      host_req = (cyc == 1);
      host_cmd = cmd(BUS_WR, 0, 0, 0, 0);
      #1;
      got = 0; winner = -1;
      foreach (m_gnt[g]) if (m_gnt[g]) begin got++; winner = g; end
      if (host_req) begin
        check("no Master grant while the host holds the bus", got, 0);
      end else begin
        int exp_w;
        exp_w = -1;
        for (int i = 0; i < NGRP; i++) if (exp_w < 0 && pending[(rr + i) % NGRP] != 0) exp_w = (rr + i) % NGRP;
        check("one Master granted", got, 1);
        check("round-robin winner", winner, exp_w);
        check("bus carries the winner's command", tgt_sel[(exp_w + 1) % NGRP] && tgt_wdata == byte_t'(8'hA0 + exp_w), 1);
        pending[exp_w] = 0; served[exp_w]++; left--;
        rr = (exp_w + 1) % NGRP;
      end
      @(negedge clk);
    end
    check("all four served", left, 0);
    foreach (m_req[g]) m_req[g] = 0;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
