// tb_ppan_border: checks the three border settings. Wrap must join opposite
// edges, input must put the image lines on the west edge and the border
// value elsewhere, and constant must give the value everywhere; for the
// one-bit up-down edges the value must come out MSB first, one bit per step.
module tb_ppan_border;
  import ppan_pkg::*;
  logic clk = 0, rst, we;
  border_e mode_in, mode;
  byte_t val_in, val;
  byte_t img_in[ASIDE], wedge_mem_o[ASIDE], wedge_a_o[ASIDE], eedge_mem_o[ASIDE], eedge_a_o[ASIDE];
  byte_t wedge_mem_i[ASIDE], wedge_a_i[ASIDE], eedge_mem_i[ASIDE], eedge_a_i[ASIDE];
  logic nedge_v_o[ASIDE], sedge_v_o[ASIDE], nedge_v_i[ASIDE], sedge_v_i[ASIDE];
  logic top_vstart[GSIDE], top_vstep[GSIDE], bot_vstart[GSIDE], bot_vstep[GSIDE];
  int checks = 0, failures = 0;

  ppan_border dut (.*);
  always #5 clk = ~clk;

  task automatic check(string what, int got, int exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s got %h exp %h", what, got, exp);
    end
  endtask

  task automatic set(border_e m, byte_t v);
    @(negedge clk); we = 1; mode_in = m; val_in = v;
    @(negedge clk); we = 0;
  endtask

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    byte_t got;
    rst = 1; we = 0; mode_in = BRD_CONST; val_in = 0;
    for (int i = 0; i < ASIDE; i++) begin
      img_in[i] = byte_t'(8'h40 + i);
      wedge_mem_o[i] = byte_t'(8'h50 + i); wedge_a_o[i] = byte_t'(8'h60 + i);
      eedge_mem_o[i] = byte_t'(8'h70 + i); eedge_a_o[i] = byte_t'(8'h80 + i);
      nedge_v_o[i] = i[0]; sedge_v_o[i] = !i[0];
    end
    for (int g = 0; g < GSIDE; g++) begin
      top_vstart[g] = 0; top_vstep[g] = 0; bot_vstart[g] = 0; bot_vstep[g] = 0;
    end
    repeat (2) @(negedge clk);
    rst = 0;
    check("reset mode", mode, BRD_CONST);

    set(BRD_WRAP, 8'h00);
    #1;
    for (int i = 0; i < ASIDE; i++) begin
      check("wrap west mem", wedge_mem_i[i], 8'h70 + i);
      check("wrap west A",   wedge_a_i[i],   8'h80 + i);
      check("wrap east mem", eedge_mem_i[i], 8'h50 + i);
      check("wrap east A",   eedge_a_i[i],   8'h60 + i);
      check("wrap north",    nedge_v_i[i],   !i[0]);
      check("wrap south",    sedge_v_i[i],   i[0]);
    end

    set(BRD_INPUT, 8'h3C);
    #1;
    for (int i = 0; i < ASIDE; i++) begin
      check("input west mem", wedge_mem_i[i], 8'h40 + i);
      check("input west A",   wedge_a_i[i],   8'h40 + i);
      check("input east",     eedge_a_i[i],   8'h3C);
    end

    set(BRD_CONST, 8'hB5);
    #1;
    for (int i = 0; i < ASIDE; i++) begin
      check("const west", wedge_mem_i[i], 8'hB5);
      check("const east", eedge_mem_i[i], 8'hB5);
    end
    // up-down stream of the value over the top of Group column 1 and the bottom of column 3
    @(negedge clk); top_vstart[1] = 1; bot_vstart[3] = 1;
    @(negedge clk); top_vstart[1] = 0; bot_vstart[3] = 0;
    for (int b = 0; b < 8; b++) begin
      top_vstep[1] = 1; bot_vstep[3] = 1;
      #1;
      got = {got[6:0], nedge_v_i[5]};
      check("south stream", sedge_v_i[13], (8'hB5 >> (7 - b)) & 1);
      @(negedge clk);
      top_vstep[1] = 0; bot_vstep[3] = 0;
      @(negedge clk);
    end
    check("north stream byte", got, 8'hB5);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
