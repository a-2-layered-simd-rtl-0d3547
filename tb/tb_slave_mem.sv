// tb_slave_mem: writes a pattern through port A, then reads every written
// location back through port A and port B and compares with a scoreboard.
module tb_slave_mem;
  import ppan_pkg::*;
  logic clk = 0;
  logic we;
  addr_t addr, nb_addr;
  byte_t wdata, rdata, nb_rdata;
  byte_t model [int];
  int checks = 0, failures = 0;

  slave_mem dut (.clk, .we, .addr, .wdata, .rdata, .nb_addr, .nb_rdata);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    we = 0; addr = '0; nb_addr = '0; wdata = '0;
    // fill the ends and a spread of random addresses
    for (int i = 0; i < 600; i++) begin
      int ad;
      ad = (i == 0) ? 0 : (i == 1) ? MEM_DEPTH - 1 : int'($urandom_range(MEM_DEPTH - 1));
      @(negedge clk);
      we = 1; addr = addr_t'(ad); wdata = byte_t'($urandom);
      model[ad] = wdata;
    end
    @(negedge clk) we = 0;
    foreach (model[ad]) begin
      @(negedge clk);
      addr = addr_t'(ad);
      nb_addr = addr_t'(MEM_DEPTH - 1 - ad);
      #1;
      checks++;
      if (rdata !== model[ad]) begin
        failures++;
        $display("FAIL port A @%0d got %h exp %h", ad, rdata, model[ad]);
      end
      if (model.exists(MEM_DEPTH - 1 - ad)) begin
        checks++;
        if (nb_rdata !== model[MEM_DEPTH - 1 - ad]) begin
          failures++;
          $display("FAIL port B @%0d", MEM_DEPTH - 1 - ad);
        end
      end
      nb_addr = addr_t'(ad);
      #1;
      checks++;
      if (nb_rdata !== model[ad]) begin
        failures++;
        $display("FAIL port B @%0d got %h exp %h", ad, nb_rdata, model[ad]);
      end
    end
    // a disabled write leaves memory alone
    @(negedge clk); we = 0; addr = '0; wdata = ~model[0];
    @(negedge clk); #1;
    checks++;
    if (rdata !== model[0]) begin failures++; $display("FAIL write without we"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
