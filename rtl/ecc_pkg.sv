// ecc_pkg: constants and control-word types shared by the GF(2^191)
// Montgomery-ladder elliptic curve coprocessor.
//
// The field is GF(2^191) in polynomial basis. The field size and the
// 50-bit multiplier word length (4 cycles per multiplication) are the
// design's main configuration; the reduction trinomial x^191 + x^9 + 1 is
// this design's choice (the standard trinomial for 191-bit binary curves).
//
// Every state machine of the coprocessor drives the shared datapath through
// one control word, ctrl_t. A control word names, for each operand input of
// each functional unit, which source feeds it (src_e), and for each port of
// the dual-ported operand memory what to do. Memory addresses can be given
// directly or indirectly, as an index into the four parameter addresses that
// the main state machine publishes (the indirect addressing of the design).
package ecc_pkg;

  // ---------------------------------------------------------------- field
  localparam int unsigned FIELD_N   = 191;   // GF(2^191)
  localparam int unsigned WORD_D    = 50;    // multiplier word length
  // Reduction polynomial without its x^191 term: x^9 + 1.
  localparam logic [FIELD_N-1:0] FIELD_POLY = FIELD_N'(1) | (FIELD_N'(1) << 9);

  // ---------------------------------------------------------------- memory
  localparam int unsigned ADDR_W    = 4;
  localparam int unsigned MEM_WORDS = 16;

  // Fixed locations of the operand memory.
  localparam logic [ADDR_W-1:0] A_X   = 4'd0;  // affine x of the base point P
  localparam logic [ADDR_W-1:0] A_Y   = 4'd1;  // affine y of P
  localparam logic [ADDR_W-1:0] A_B   = 4'd2;  // curve coefficient b
  localparam logic [ADDR_W-1:0] A_X1  = 4'd3;  // ladder point P1 = (X1 : Z1)
  localparam logic [ADDR_W-1:0] A_Z1  = 4'd4;
  localparam logic [ADDR_W-1:0] A_X2  = 4'd5;  // ladder point P2 = (X2 : Z2)
  localparam logic [ADDR_W-1:0] A_Z2  = 4'd6;
  localparam logic [ADDR_W-1:0] A_T0  = 4'd7;  // temporaries
  localparam logic [ADDR_W-1:0] A_T1  = 4'd8;
  localparam logic [ADDR_W-1:0] A_T2  = 4'd9;
  // words 10 to 12 and 15 are free
  localparam logic [ADDR_W-1:0] A_RX  = 4'd13; // affine result x of mP
  localparam logic [ADDR_W-1:0] A_RY  = 4'd14; // affine result y of mP

  // ---------------------------------------------------------------- control
  // Operand sources inside the datapath.
  typedef enum logic [3:0] {
    SRC_ZERO  = 4'd0,
    SRC_ONE   = 4'd1,
    SRC_RDA   = 4'd2,   // read data of memory port A
    SRC_RDB   = 4'd3,   // read data of memory port B
    SRC_MUL0  = 4'd4,   // product register of multiplier 0
    SRC_MUL1  = 4'd5,   // product register of multiplier 1
    SRC_SQR0  = 4'd6,   // squarer 0 output
    SRC_SQR1  = 4'd7,   // squarer 1 output
    SRC_ADD0  = 4'd8,   // adder 0 output
    SRC_ADD1  = 4'd9,   // adder 1 output
    SRC_SQREG = 4'd10   // squaring register (repeated squaring)
  } src_e;

  // Request for one memory port as a state machine issues it.
  typedef struct packed {
    logic              rd;        // read, data valid in the next cycle
    logic              we;        // write wsrc at the address
    logic              use_param; // address = parameter address [pidx]
    logic [1:0]        pidx;
    logic [ADDR_W-1:0] addr;      // direct address
    src_e              wsrc;
  } port_req_t;

  // Control of one multiplier.
  typedef struct packed {
    logic start;   // begin a multiplication
    logic la;      // load operand a from asrc
    logic lb;      // load operand b from bsrc
    src_e asrc;
    src_e bsrc;
  } mul_ctrl_t;

  typedef struct packed {
    port_req_t pa;
    port_req_t pb;
    mul_ctrl_t m0;
    mul_ctrl_t m1;
    src_e      sqr0_src;  // any source but SRC_SQR0/1, SRC_ADD1
    src_e      sqr1_src;  // any source but SRC_SQR1, SRC_ADD1
    src_e      add0_a;    // sources that are not squarer or adder outputs
    src_e      add0_b;
    src_e      add1_a;    // any source but SRC_ADD1
    src_e      add1_b;
    logic      sq_ld;     // load the squaring register from sq_src
    src_e      sq_src;
  } ctrl_t;

  localparam port_req_t PORT_IDLE = '{rd: 1'b0, we: 1'b0, use_param: 1'b0,
                                      pidx: 2'd0, addr: '0, wsrc: SRC_ZERO};
  localparam mul_ctrl_t MUL_IDLE  = '{start: 1'b0, la: 1'b0, lb: 1'b0,
                                      asrc: SRC_ZERO, bsrc: SRC_ZERO};
  localparam ctrl_t CTRL_IDLE = '{pa: PORT_IDLE, pb: PORT_IDLE,
                                  m0: MUL_IDLE, m1: MUL_IDLE,
                                  sqr0_src: SRC_ZERO, sqr1_src: SRC_ZERO,
                                  add0_a: SRC_ZERO, add0_b: SRC_ZERO,
                                  add1_a: SRC_ZERO, add1_b: SRC_ZERO,
                                  sq_ld: 1'b0, sq_src: SRC_ZERO};

  // Helpers for the state machines.
  function automatic port_req_t rd_dir(logic [ADDR_W-1:0] a);
    port_req_t p = PORT_IDLE;
    p.rd = 1'b1; p.addr = a;
    return p;
  endfunction

  function automatic port_req_t rd_par(logic [1:0] i);
    port_req_t p = PORT_IDLE;
    p.rd = 1'b1; p.use_param = 1'b1; p.pidx = i;
    return p;
  endfunction

  function automatic port_req_t wr_dir(logic [ADDR_W-1:0] a, src_e s);
    port_req_t p = PORT_IDLE;
    p.we = 1'b1; p.addr = a; p.wsrc = s;
    return p;
  endfunction

  function automatic port_req_t wr_par(logic [1:0] i, src_e s);
    port_req_t p = PORT_IDLE;
    p.we = 1'b1; p.use_param = 1'b1; p.pidx = i; p.wsrc = s;
    return p;
  endfunction

  function automatic mul_ctrl_t mul_go(src_e a, src_e b);
    mul_ctrl_t m;
    m.start = 1'b1; m.la = 1'b1; m.lb = 1'b1; m.asrc = a; m.bsrc = b;
    return m;
  endfunction

endpackage
