// tb_slave_pe: drives the Slave with random control words and inputs for
// several thousand clocks and checks fetched byte, ALU result, carry, A, Q
// and the vertical output bit against a behavioural model each clock. A
// directed part then moves a byte in bit-serially over eight Q steps.
module tb_slave_pe;
  import ppan_pkg::*;
  logic clk = 0, rst;
  slave_ctl_t ctl;
  logic en, n_v, s_v, cin, cout, v_out;
  byte_t mem_rdata, w_mem, e_mem, w_a, e_a, routed, imm, fetched, a, y;
  byte_t ma, mq;   // model registers
  int checks = 0, failures = 0;

  slave_pe dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(string what, int got, int exp);
    checks++;
    if (got !== exp) begin
      failures++;
      if (failures < 20) $display("FAIL %s got %h exp %h (t=%0t)", what, got, exp, $time);
    end
  endtask

  initial begin
    alu_fn_e fns[6] = '{ALU_PASS, ALU_ADD, ALU_SUB, ALU_AND, ALU_OR, ALU_XOR};
    byte_t ef, eo, neo;
    logic [8:0] r;
    logic vin;
    rst = 1; ctl = '0; en = 0; {n_v, s_v, cin} = '0;
    {mem_rdata, w_mem, e_mem, w_a, e_a, routed, imm} = '0;
    @(negedge clk); @(negedge clk);
    rst = 0;
    ma = 0; mq = 0;
    check("reset A", a, 0);
    for (int i = 0; i < 5000; i++) begin
      @(negedge clk);
      ctl        = slave_ctl_t'($urandom);
      ctl.fn     = fns[$urandom_range(5)];
      ctl.fsel   = fsel_e'($urandom_range(2));
      ctl.osel   = osel_e'($urandom_range(2));
      en         = $urandom_range(3) != 0;
      {n_v, s_v, cin} = 3'($urandom);
      mem_rdata = byte_t'($urandom); w_mem = byte_t'($urandom); e_mem = byte_t'($urandom);
      w_a = byte_t'($urandom); e_a = byte_t'($urandom); routed = byte_t'($urandom);
      imm = byte_t'($urandom);
      #1;
      ef = (ctl.fsel == F_OWN) ? mem_rdata : (ctl.fsel == F_HNB) ? (ctl.hdir_e ? e_mem : w_mem) : mq;
      eo = (ctl.osel == O_ROUTE) ? routed : (ctl.osel == O_IMM) ? imm : (ctl.hdir_e ? e_a : w_a);
      case (ctl.fn)
        ALU_PASS: r = {1'b0, eo};
        ALU_ADD:  r = 9'(ma) + 9'(eo) + 9'(cin);
        ALU_SUB:  begin neo = ~eo; r = 9'(ma) + 9'(neo) + 9'(cin); end
        ALU_AND:  r = {1'b0, ma & eo};
        ALU_OR:   r = {1'b0, ma | eo};
        default:  r = {1'b0, ma ^ eo};
      endcase
      check("fetched", fetched, ef);
      check("y", y, r[7:0]);
      check($sformatf("cout fn=%s", ctl.fn.name()), cout, r[8]);
      check("v_out", v_out, ctl.vsel_q ? mq[7] : ma[7]);
      vin = ctl.vdir_s ? s_v : n_v;
      if (en && ctl.a_we)        ma = r[7:0];
      else if (en && ctl.a_step) ma = {ma[6:0], vin};
      if (ctl.q_ld)              mq = mem_rdata;
      else if (ctl.q_step)       mq = {mq[6:0], vin};
      @(posedge clk); #1;
      check("A", a, ma);
    end
    // directed: a byte arrives bit-serially from the north into Q
    @(negedge clk);
    ctl = '0; ctl.q_ld = 1; mem_rdata = 8'h00;
    @(negedge clk);
    ctl = '0; ctl.q_step = 1; ctl.vsel_q = 1;
    for (int b = 7; b >= 0; b--) begin
      n_v = 8'hB6 >> b;
      @(negedge clk);
    end
    ctl = '0; ctl.fsel = F_Q; ctl.vsel_q = 1;
    #1;
    check("Q after 8 steps", fetched, 8'hB6);
    check("v_out = Q[7]", v_out, 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
