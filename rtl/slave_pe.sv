// slave_pe: one 8-bit Slave processor, built from two 4-bit ALU slices.
//
// Registers: accumulator A and shift register Q. Every clock the Master's
// broadcast control word (ctl) selects what happens:
//   * fetched - the byte this Slave offers to the Group's byte router: its own
//     memory, the memory of its west or east neighbour, or Q.
//   * a_we    - A <= fn(A, operand); operand is the routed byte, the
//     immediate byte, or the A of the west/east neighbour (register shift).
//   * a_step / q_step - shift A or Q left one bit, taking the new low bit from
//     the north or south neighbour's vertical output (v_out). Eight steps move
//     a whole byte one row: the up-down path is one bit wide, as the document
//     says the board forces, and the Master hides this by sequencing 8 steps.
//   * q_ld    - Q <= own memory byte (start of an up-down fetch).
// A writes are gated by en (the Master's Slave mask, all ones in SIMD mode);
// Q operations act on every Slave so that any Slave can source a byte.
// cin/cout chain the carry between Slaves ganged into a 16..32-bit word.
// The register set and control encoding are this design's own.
module slave_pe
  import ppan_pkg::*;
(
  input  logic       clk,
  input  logic       rst,
  input  slave_ctl_t ctl,
  input  logic       en,
  input  byte_t      mem_rdata,   // own memory, port A
  input  byte_t      w_mem,       // west neighbour's memory at this Group's address
  input  byte_t      e_mem,       // east neighbour's memory
  input  byte_t      w_a,         // west neighbour's A
  input  byte_t      e_a,         // east neighbour's A
  input  logic       n_v,         // north neighbour's vertical output bit
  input  logic       s_v,         // south neighbour's vertical output bit
  input  byte_t      routed,      // operand byte after the Group's router
  input  byte_t      imm,
  input  logic       cin,
  output byte_t      fetched,
  output byte_t      a,
  output byte_t      y,           // ALU result (for flags)
  output logic       cout,
  output logic       v_out
);
  byte_t q, opnd;
  logic  c_mid, vin;

  always_comb begin
    unique case (ctl.fsel)
      F_OWN:   fetched = mem_rdata;
      F_HNB:   fetched = ctl.hdir_e ? e_mem : w_mem;
      F_Q:     fetched = q;
      default: fetched = mem_rdata;
    endcase
    unique case (ctl.osel)
      O_ROUTE: opnd = routed;
      O_IMM:   opnd = imm;
      O_NBA:   opnd = ctl.hdir_e ? e_a : w_a;
      default: opnd = routed;
    endcase
  end

  alu_slice4 u_lo (.a(a[3:0]), .b(opnd[3:0]), .cin(cin),   .fn(ctl.fn), .y(y[3:0]), .cout(c_mid));
  alu_slice4 u_hi (.a(a[7:4]), .b(opnd[7:4]), .cin(c_mid), .fn(ctl.fn), .y(y[7:4]), .cout(cout));

  assign vin   = ctl.vdir_s ? s_v : n_v;
  assign v_out = ctl.vsel_q ? q[7] : a[7];

  always_ff @(posedge clk) begin
    if (rst) begin
      a <= '0;
      q <= '0;
    end else begin
      if (en && ctl.a_we)        a <= y;
      else if (en && ctl.a_step) a <= {a[6:0], vin};
      if (ctl.q_ld)              q <= mem_rdata;
      else if (ctl.q_step)       q <= {q[6:0], vin};
    end
  end
endmodule
