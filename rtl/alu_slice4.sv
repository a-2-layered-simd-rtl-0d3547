// alu_slice4: one 4-bit bit-slice ALU, the building block of every processor
// in the Array/Net. A Slave is two slices with the carry chained; a Master
// word of 16, 24 or 32 bits is the slices of 2, 3 or 4 Slaves chained the
// same way. Purely combinational: y and cout follow a, b, cin and fn.
// The document builds from a commercial 4-bit slice family and gives no
// function list; the six functions below are this design's minimal set.
module alu_slice4
  import ppan_pkg::*;
(
  input  logic [3:0] a,
  input  logic [3:0] b,
  input  logic       cin,
  input  alu_fn_e    fn,
  output logic [3:0] y,
  output logic       cout
);
  logic [4:0] sum;

  always_comb begin
    sum  = '0;
    y    = '0;
    cout = 1'b0;
    unique case (fn)
      ALU_PASS: y = b;
      ALU_ADD: begin
        sum  = {1'b0, a} + {1'b0, b} + {4'b0, cin};
        y    = sum[3:0];
        cout = sum[4];
      end
      ALU_SUB: begin
        sum  = {1'b0, a} + {1'b0, ~b} + {4'b0, cin};
        y    = sum[3:0];
        cout = sum[4];
      end
      ALU_AND: y = a & b;
      ALU_OR:  y = a | b;
      ALU_XOR: y = a ^ b;
      default: y = b;
    endcase
  end
endmodule
