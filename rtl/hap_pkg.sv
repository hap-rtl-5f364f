// hap_pkg: sizes, encodings and shared types of the HAP adaptive-precision
// bit-serial accelerator.
//
// The defaults are the configuration the design is built around: a 16 x 32
// array of processing engines (PEs), each with L = 16 bit-serial multipliers,
// a DAR group size of 16 activation rows, 8-bit base activation precision,
// register pages of R = 8 entries and a precision-blending window of up to
// 3 bits. Address and buffer sizes marked "own choice" are not fixed by the
// architecture description and were chosen here.
//
// The package only declares these constants; the modules use them as their
// parameter defaults, so a lint run on the package alone reports them as
// unused.
package hap_pkg;

  // ---- architecture (follows the design description) ----
  localparam int unsigned L_DEF      = 16;  // multipliers per PE = submatrices = register pages
  localparam int unsigned M_DEF      = 16;  // array rows = DAR group size GS
  localparam int unsigned N_DEF      = 32;  // array columns
  localparam int unsigned BA_DEF     = 8;   // base activation precision B^a (also largest DAR precision)
  localparam int unsigned R_DEF      = 8;   // entries per register page
  localparam int unsigned WSMAX_DEF  = 3;   // largest precision-blending window
  localparam int unsigned ACC_W_DEF  = 32;  // accumulator width
  localparam int unsigned AW_DEF     = 12;  // weight / activation address width (24-bit entry data)

  // ---- buffers (own choice) ----
  localparam int unsigned ACT_DEPTH_DEF  = 4096; // bit-plane words per activation bank
  localparam int unsigned WGT_DEPTH_DEF  = 512;  // weight rows per weight bank
  localparam int unsigned PREC_DEPTH_DEF = 1024; // metadata words per precision bank

  // Nibble width of the primitive multiplier (4-bit weights; 8-bit weights
  // take two nibble cycles).
  localparam int unsigned NIB = 4;

  // Operation applied by every PE of the array in one cycle.
  typedef enum logic [1:0] {
    PE_HOLD  = 2'd0,  // keep the accumulator
    PE_CLEAR = 2'd1,  // accumulator := 0
    PE_ACC   = 2'd2,  // accumulator += (adder tree sum) << offset
    PE_AGG   = 2'd3   // accumulator += partial result of another PE
  } pe_op_e;

  // Buffer selector of the host write port.
  typedef enum logic [1:0] {
    BUF_ACT  = 2'd0,
    BUF_WGT  = 2'd1,
    BUF_PREC = 2'd2
  } buf_sel_e;

endpackage
