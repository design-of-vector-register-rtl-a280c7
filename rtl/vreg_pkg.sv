// Shared types and constants of the 2-D vector register datapath.
//
// The register file holds NUM_REGS registers of LANES elements of ELEM_W bits
// (8 x 4 x 8 bits by default). The elements are grouped into square banks of
// LANES x LANES, so that LANES consecutive registers can be read either as rows
// (row mode) or as columns (column mode). A register address is a mode bit plus
// a register number; with eight registers that is the 1 + 3 = 4-bit select of
// the read multiplexers.
//
// Element 0 of a word is the leftmost pixel of a row (or the top pixel of a
// column) and sits in the most significant byte, matching the a b c d order
// in which a row of a 4x4 sub-block is drawn.
//
// The instruction bundle and its opcodes are this design's own: the register
// file is the subject, so the instruction is kept as a packed struct of
// decoded fields rather than a bit-level encoding.
package vreg_pkg;

  localparam int unsigned LANES    = 4;  // elements per register (4 pixels)
  localparam int unsigned ELEM_W   = 8;  // bits per element (8-bit pixels)
  localparam int unsigned NUM_REGS = 8;  // 32-bit registers (R0..R7 / C0..C7)
  localparam int unsigned REG_AW   = $clog2(NUM_REGS);

  typedef enum logic {
    MODE_ROW = 1'b0,  // register number selects a row  (R0..R7)
    MODE_COL = 1'b1   // register number selects a column (C0..C7)
  } vmode_e;

  typedef logic [ELEM_W-1:0]            elem_t;
  typedef logic [0:LANES-1][ELEM_W-1:0] vword_t;  // element 0 is the MSB byte

  typedef struct packed {
    vmode_e            mode;
    logic [REG_AW-1:0] num;
  } vreg_addr_t;

  // A pending register-file write, as seen by the bypass logic.
  typedef struct packed {
    logic       valid;
    vreg_addr_t addr;
    vword_t     data;
  } vreg_wr_t;

  typedef enum logic [1:0] {
    OP_NOP   = 2'd0,
    OP_LOAD  = 2'd1,  // reg[rd]   <- mem[addr]
    OP_STORE = 2'd2,  // mem[addr] <- reg[ra]
    OP_FILT  = 2'd3   // {reg[ra], reg[rb]} <- filter(reg[ra] = p3..p0, reg[rb] = q0..q3)
  } vop_e;

  // Deblocking-filter controls that come with every FILT instruction.
  typedef struct packed {
    logic [2:0] bs;      // boundary strength 0..4
    logic       chroma;  // chroma edge: only p1..q1 are used, p0/q0 modified
    logic [7:0] alpha;
    logic [7:0] beta;
    logic [4:0] tc0;
  } dbf_ctrl_t;

  localparam int unsigned MEM_AW = 10;  // word address width of the data SRAM

  typedef struct packed {
    vop_e              op;
    vreg_addr_t        ra;    // LOAD: destination; STORE: source; FILT: p side
    vreg_addr_t        rb;    // FILT: q side
    logic [MEM_AW-1:0] addr;  // LOAD / STORE word address
    dbf_ctrl_t         ctrl;  // FILT controls
  } vinstr_t;

  // One-cycle event flags of the datapath, for counting and observation.
  typedef struct packed {
    logic issue;         // an instruction left the read stage
    logic mode_switch;   // it accesses registers in the other mode than the last one did
    logic bypass;        // at least one operand byte was forwarded
    logic bypass_cross;  // a forwarded byte came from a write in the other mode
    logic wport_stall;   // read stage held: the write port is busy with a FILT's second word
    logic hazard_stall;  // read stage held on an operand hazard (forwarding disabled)
    logic filt_normal;   // a FILT line was changed by the bs < 4 filter
    logic filt_strong;   // a FILT line used the bs = 4 strong luma filter
    logic filt_skip;     // a FILT line was left unchanged (edge condition false)
    logic mem_fwd;       // a LOAD took its word from the STORE just before it
  } vreg_events_t;

endpackage
