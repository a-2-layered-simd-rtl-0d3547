// ppan_pkg: types and constants shared by the Parallel Pyramidal Array/Net.
//
// The machine is 16 Groups arranged 4x4; each Group is a 4x4 array of 8-bit
// Slaves (each with 16K bytes of memory) run by one Master sequencer that
// executes 64-bit microwords. Those numbers are the document's. Everything
// about the microword layout, the opcodes and the bus commands below is this
// design's own choice: the document fixes only the word width (64 bits) and
// that a pair of words is fetched as 16 bytes, one from each Slave.
//
// Timing model: one clock stands for 200 ns. A memory cycle (400 ns DRAM) is
// MEM_CYC clocks, a left-right 8-bit transfer (600 ns) HSH_CYC clocks and one
// bit of up-down shifting (400 ns) VBIT_CYC clocks, as the document states.
package ppan_pkg;

  localparam int unsigned DATA_W    = 8;      // Slave word (two 4-bit slices)
  localparam int unsigned ADDR_W    = 14;     // 16K bytes per Slave
  localparam int unsigned MEM_DEPTH = 16384;
  localparam int unsigned SIDE      = 4;      // Slaves per Group side
  localparam int unsigned NSLV      = 16;     // Slaves per Group
  localparam int unsigned GSIDE     = 4;      // Groups per array side
  localparam int unsigned NGRP      = 16;     // Groups
  localparam int unsigned ASIDE     = 16;     // Slaves per array side
  localparam int unsigned PC_W      = 15;     // microword index; pair address = pc[14:1]

  localparam int unsigned MEM_CYC   = 2;      // 400 ns memory cycle
  localparam int unsigned HSH_CYC   = 3;      // 600 ns left-right byte transfer
  localparam int unsigned VBIT_CYC  = 2;      // 400 ns per up-down bit

  typedef logic [DATA_W-1:0] byte_t;
  typedef logic [ADDR_W-1:0] addr_t;

  // ALU functions of a 4-bit slice.
  typedef enum logic [3:0] {
    ALU_PASS = 4'd0,   // y = b
    ALU_ADD  = 4'd1,   // y = a + b + cin
    ALU_SUB  = 4'd2,   // y = a + ~b + cin (cin = 1 gives a - b)
    ALU_AND  = 4'd3,
    ALU_OR   = 4'd4,
    ALU_XOR  = 4'd5
  } alu_fn_e;

  // Microword opcodes.
  typedef enum logic [5:0] {
    OP_NOP   = 6'd0,
    OP_ALU   = 6'd1,   // A <= fn(A, operand) in every enabled Slave
    OP_ST    = 6'd2,   // own memory[addr] <= A
    OP_SHIFT = 6'd3,   // A <= A of the neighbour in direction src
    OP_JMP   = 6'd4,
    OP_BZ    = 6'd5,
    OP_BNZ   = 6'd6,
    OP_BC    = 6'd7,
    OP_BN    = 6'd8,
    OP_SEND  = 6'd9,   // bus write of A[base] into another Group's memory
    OP_HALT  = 6'd10
  } op_e;

  // Operand source.
  typedef enum logic [2:0] {
    SRC_OWN = 3'd0,   // own memory
    SRC_W   = 3'd1,   // west neighbour (byte-wide, HSH_CYC clocks)
    SRC_E   = 3'd2,   // east neighbour
    SRC_N   = 3'd3,   // north neighbour (bit-serial, VBIT_CYC clocks per bit)
    SRC_S   = 3'd4,   // south neighbour
    SRC_IMM = 3'd5    // immediate field
  } src_e;

  // 64-bit microword. Bytes 0..7 of a word live in Slaves 0..7 (word 0 of a
  // pair) or 8..15 (word 1), least significant byte in the lowest Slave.
  typedef struct packed {
    op_e        op;     // [63:58]
    alu_fn_e    fn;     // [57:54]
    src_e       src;    // [53:51]
    logic       gang;   // [50]    0: all 16 Slaves, SIMD; 1: Slaves ganged into one Master word
    logic [1:0] wid;    // [49:48] gang width - 1: 8, 16, 24 or 32 bits
    logic [3:0] base;   // [47:44] lowest Slave of the gang (its registers)
    logic [3:0] mslv;   // [43:40] lowest Slave whose memory holds the word
    addr_t      addr;   // [39:26] data address, or branch target (microword index)
    logic [3:0] tgrp;   // [25:22] SEND: target Group
    logic [3:0] tslv;   // [21:18] SEND: target Slave
    logic [15:0] imm;   // [17:2]  immediate
    logic [1:0] rsvd;   // [1:0]
  } uword_t;

  // Fetch source of a Slave's operand byte before the Group's byte router.
  typedef enum logic [1:0] {F_OWN = 2'd0, F_HNB = 2'd1, F_Q = 2'd2} fsel_e;
  // ALU b-operand of a Slave.
  typedef enum logic [1:0] {O_ROUTE = 2'd0, O_IMM = 2'd1, O_NBA = 2'd2} osel_e;

  // Control word broadcast by the Master to all 16 Slaves of its Group.
  typedef struct packed {
    logic    a_we;    // A <= ALU result (enabled Slaves)
    logic    a_step;  // A <= {A[6:0], vin} (enabled Slaves)
    logic    q_ld;    // Q <= own memory byte (all Slaves)
    logic    q_step;  // Q <= {Q[6:0], vin} (all Slaves)
    logic    vsel_q;  // vertical output bit is Q[7] (else A[7])
    logic    vdir_s;  // vin comes from the south (else north)
    logic    hdir_e;  // horizontal neighbour is east (else west)
    fsel_e   fsel;
    osel_e   osel;
    alu_fn_e fn;
  } slave_ctl_t;

  // Common bus commands.
  typedef enum logic [1:0] {
    BUS_WR     = 2'd0,  // write a byte into (group, slave, addr)
    BUS_RD     = 2'd1,  // read a byte (host only), data on the next clock
    BUS_START  = 2'd2,  // start Group grp, the Groups in gmask, or all, at microword addr
    BUS_BORDER = 2'd3   // set border mode (addr[1:0]) and value (data)
  } bus_op_e;

  typedef struct packed {
    bus_op_e    op;
    logic       bcast;  // WR and START: every Group
    logic [NGRP-1:0] gmask; // START: set of Groups started in the same clock (0: use grp)
    logic [3:0] grp;
    logic [3:0] slv;
    addr_t      addr;
    byte_t      data;
  } bus_cmd_t;

  typedef enum logic [1:0] {
    BRD_INPUT = 2'd0,   // west edge takes the image input lines, other edges the value
    BRD_WRAP  = 2'd1,   // left/right columns and top/bottom rows joined
    BRD_CONST = 2'd2    // every edge reads the border value
  } border_e;

endpackage
