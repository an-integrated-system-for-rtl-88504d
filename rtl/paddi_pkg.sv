// paddi_pkg: constants and types shared by the blocks of the PADDI
// multiprocessor chip.
//
// The sizes follow the prototype: eight 16-bit execution units (EXUs), four
// input and four output channels of 16 bits, six registers per register
// file, an eight-word nanostore addressed by a 3-bit global address and a
// 53-bit instruction word. The bit layout of the instruction word, the
// opcode encoding and the static configuration record are this design's
// own choices. The document fixes only the word width and the kinds of
// operation.
package paddi_pkg;

  localparam int unsigned N_EXU      = 8;   // EXUs per chip
  localparam int unsigned N_IN       = 4;   // input channels
  localparam int unsigned N_OUT      = 4;   // output channels
  localparam int unsigned DW         = 16;  // EXU / channel width
  localparam int unsigned N_REG      = 6;   // registers per register file
  localparam int unsigned SCAN_IDX   = 5;   // register R6 is the scan register
  localparam int unsigned NS_WORDS   = 8;   // nanostore depth
  localparam int unsigned GA_W       = 3;   // global address width
  localparam int unsigned IW         = 53;  // instruction word width
  localparam int unsigned N_EXT_FLAG = 2;   // flag inputs from other chips

  // Crossbar source codes: 0..7 EXU results, 8..11 input channels.
  localparam int unsigned SRC_IN0 = 8;
  // Flag source codes: 0..7 EXU flags, 8..9 external flag inputs.
  localparam int unsigned FSRC_EXT0 = 8;

  typedef enum logic [3:0] {
    OP_ADD   = 4'd0,  // A + (B >> sh), wraps
    OP_SUB   = 4'd1,  // A - (B >> sh), wraps
    OP_ADDS  = 4'd2,  // saturating add (two's complement or unsigned)
    OP_SUBS  = 4'd3,  // saturating subtract
    OP_CMP   = 4'd4,  // flag <= A >= (B >> sh), result A - (B >> sh)
    OP_MAX   = 4'd5,  // max(A, B >> sh), also sets the flag
    OP_MIN   = 4'd6,  // min(A, B >> sh), also sets the flag
    OP_PASSA = 4'd7,  // A
    OP_PASSB = 4'd8   // B >> sh
  } op_e;

  // Result selection decided by the upper (or only) half of a data path.
  typedef enum logic [2:0] {
    SEL_SUM  = 3'd0,
    SEL_A    = 3'd1,
    SEL_B    = 3'd2,
    SEL_SATP = 3'd3,  // positive saturation value
    SEL_SATN = 3'd4   // negative saturation value (zero when unsigned)
  } sel_e;

  // 53-bit nanostore word. Register addresses 0..5 name R1..R6.
  typedef struct packed {
    op_e        op;      // 4  operation
    logic [2:0] shamt;   // 3  right shift of B, 0..7 (x1 .. x1/128)
    logic [3:0] xsrc_a;  // 4  crossbar source for the A file input
    logic [3:0] xsrc_b;  // 4  crossbar source for the B file input
    logic       fb_a;    // 1  A file takes this EXU's own result
    logic       fb_b;    // 1  B file takes this EXU's own result
    logic       we_a;    // 1  write the A file
    logic [2:0] wa;      // 3  A file write address
    logic [2:0] ra;      // 3  A file read address
    logic       we_b;    // 1  write the B file
    logic [2:0] wb;      // 3  B file write address
    logic [2:0] rb;      // 3  B file read address
    logic       latch;   // 1  load the output pipeline register
    logic       oe;      // 1  drive an output channel
    logic [1:0] obus;    // 2  which output channel
    logic [1:0] ien;     // 2  interrupt enables 1 and 2
    logic [15:0] rsvd;   // 16 unused
  } instr_t;

  // Static (set-up time) configuration of one EXU.
  typedef struct packed {
    logic [2:0] iv1;       // nanostore address of interrupt vector 1
    logic [2:0] iv2;       // nanostore address of interrupt vector 2
    logic [3:0] fsw1;      // flag source of interrupt 1
    logic [3:0] fsw2;      // flag source of interrupt 2
    logic       is_signed; // two's complement (1) or unsigned (0)
    logic       link;      // odd EXU only: join with the even neighbour
    logic       del_a;     // A file works as a delay line
    logic       del_b;     // B file works as a delay line
    logic       opreg;     // result leaves through the pipeline register
  } exu_cfg_t;

  localparam int unsigned CFG_W   = $bits(exu_cfg_t);           // 19
  localparam int unsigned NS_BITS = NS_WORDS * IW;              // 424
  localparam int unsigned EXU_CHAIN = NS_BITS + CFG_W + 2 * DW; // 475

endpackage
