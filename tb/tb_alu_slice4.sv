// tb_alu_slice4: exhaustive check of the 4-bit slice over all operands,
// carry-in values and functions against an arithmetic model.
module tb_alu_slice4;
  import ppan_pkg::*;
  logic [3:0] a, b, y;
  logic cin, cout;
  alu_fn_e fn;
  int checks = 0, failures = 0;

  alu_slice4 dut (.a, .b, .cin, .fn, .y, .cout);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [4:0] e;
    alu_fn_e fns[6] = '{ALU_PASS, ALU_ADD, ALU_SUB, ALU_AND, ALU_OR, ALU_XOR};
    foreach (fns[f]) begin
      for (int i = 0; i < 16; i++)
        for (int j = 0; j < 16; j++)
          for (int c = 0; c < 2; c++) begin
            fn = fns[f]; a = 4'(i); b = 4'(j); cin = c[0];
            #1;
            case (fns[f])
              ALU_PASS: e = {1'b0, 4'(j)};
              ALU_ADD:  e = 5'(i + j + c);
              ALU_SUB:  e = 5'(i + (15 - j) + c);
              ALU_AND:  e = {1'b0, 4'(i & j)};
              ALU_OR:   e = {1'b0, 4'(i | j)};
              default:  e = {1'b0, 4'(i ^ j)};
            endcase
            checks++;
            if ({cout, y} !== e) begin
              failures++;
              $display("FAIL fn=%s a=%0d b=%0d cin=%0d got %0d/%0d exp %0d", fns[f].name(), i, j, c,
                       cout, y, e);
            end
          end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
