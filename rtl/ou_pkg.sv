// ou_pkg: types and constants shared by the Operational Unit (OU) array.
//
// The array is a torus of Operational Units. Each OU reads its operands
// through input multiplexers whose inputs are the output registers of
// neighbouring OUs. Input k of the OU at column n, row m is wired to the
// output of the OU at (n + NB_DN[k], m + NB_DM[k]), both wrapped around the
// torus. Channels 0..7 are the eight direct neighbours, 8..11 the four
// neighbours two units away along the row and column, 12..15 the four
// neighbours four units away. The 12-input variant uses channels 0..11 only.
//
// Every OU is driven by its own Control Unit, which executes one microcode
// word (instr_t) per cycle. The word layout, the operation set and the
// branch set are this design's own choice: the architecture only says that
// the microcode selects the sources, the operation and the destination of
// each cycle.
package ou_pkg;

  // Number of handshake channels of an output register: 16 neighbour
  // directions plus one external (host) port.
  localparam int NB_MAX   = 16;
  localparam int EXT_CH   = 16;
  localparam int NPORT    = NB_MAX + 1;
  localparam int PC_W     = 8;   // microcode address field, up to 256 words
  localparam int IMM_W    = 16;  // immediate field, sign-extended to the data width

  // Neighbour offsets along the row (n) and the column (m).
  localparam int NB_DN [NB_MAX] = '{ 1, -1,  0,  0,  1, -1,  1, -1,
                                     2, -2,  0,  0,  4, -4,  0,  0};
  localparam int NB_DM [NB_MAX] = '{ 0,  0,  1, -1,  1, -1, -1,  1,
                                     0,  0,  2, -2,  0,  0,  4, -4};

  // Operand source codes of the input multiplexers; 0..15 select
  // neighbour channel k.
  localparam logic [4:0] SRC_R0  = 5'd16;  // 16..23: local register r0..r7
  localparam logic [4:0] SRC_EXT = 5'd24;  // external input port
  localparam logic [4:0] SRC_IMM = 5'd25;  // immediate field of the microcode word
  localparam logic [4:0] SRC_OWN = 5'd26;  // this OU's own output register

  typedef enum logic [3:0] {
    OP_NOP  = 4'd0,   // no operation, nothing written
    OP_PASS = 4'd1,   // a
    OP_ADD  = 4'd2,   // a + b
    OP_SUB  = 4'd3,   // a - b
    OP_MUL  = 4'd4,   // low half of a * b
    OP_MULQ = 4'd5,   // fractional product (a * b) >>> (W-1)
    OP_MAC  = 4'd6,   // acc += a * b, result acc >>> (W-1)
    OP_MACZ = 4'd7,   // acc  = a * b, result acc >>> (W-1)
    OP_AND  = 4'd8,
    OP_OR   = 4'd9,
    OP_XOR  = 4'd10,
    OP_SHL  = 4'd11,  // a << b[3:0]
    OP_SRA  = 4'd12,  // a >>> b[3:0]
    OP_MAX  = 4'd13,  // signed maximum
    OP_MIN  = 4'd14,  // signed minimum
    OP_DIV  = 4'd15   // a / b, multi-cycle, only in OUs that have a divider
  } op_e;

  typedef enum logic [2:0] {
    BR_NEXT = 3'd0,   // pc + 1
    BR_JMP  = 3'd1,   // always jump to target
    BR_BZ   = 3'd2,   // jump if the zero flag is set
    BR_BNZ  = 3'd3,   // jump if the zero flag is clear
    BR_BNEG = 3'd4,   // jump if the negative flag is set
    BR_BPOS = 3'd5,   // jump if neither zero nor negative
    BR_LOOP = 3'd6,   // if loop counter != 0: decrement it and jump
    BR_HALT = 3'd7    // stop after this word
  } br_e;

  typedef struct packed {
    op_e               op;
    logic [4:0]        src_a;
    logic [4:0]        src_b;
    logic              wait_a;  // operand a must be a fresh word: wait for "data available", acknowledge it
    logic              wait_b;
    logic              wr_reg;  // write the result to local register rd
    logic [2:0]        rd;
    logic              wr_out;  // write the result to the output register ...
    logic [NPORT-1:0]  pub;     // ... and announce it on these channels
    logic              wr_lc;   // load the loop counter with the result
    br_e               br;
    logic [PC_W-1:0]   target;
    logic [IMM_W-1:0]  imm;
  } instr_t;

  localparam int INSTR_W = $bits(instr_t);

  // Torus index helpers: column n, row m, flat index m*N + n.
  function automatic int wrap(input int v, input int size);
    int r;
    r = v % size;
    if (r < 0) r += size;
    return r;
  endfunction

endpackage
