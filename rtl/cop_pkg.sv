// cop_pkg: types and constants shared by the coprocessor (COP).
//
// The coprocessor keeps images in a 32-bit wide main memory, four 8-bit
// pixels per word (byte 0 = leftmost pixel), binary images 32 pixels per word
// (bit 0 = leftmost pixel). The host programs a chain of up to eight tasks;
// each task is described by a task_t descriptor. The opcode set follows the
// processing stages the coprocessor is built for (median, local adaptive
// binarization, binary shape search, transposition, high pass filtering,
// dilation plus subsampling) plus the three data movements of the
// coprocessor data flow (sensor -> memory, host -> memory, memory -> host).
// Opcode values, field widths and the register map are this design's own.
package cop_pkg;

  localparam int DW        = 32;     // main memory / bus word
  localparam int AW        = 21;     // 2M words = 8 MB of ZBT memory
  localparam int DIMW      = 12;     // image width / height field
  localparam int MAX_TASKS = 8;      // chained processing stages
  localparam int HPF_TAPS  = 11;     // taps of each high pass filter lane
  localparam int ACQ_LANES = 4;      // pixels per 32-bit word

  typedef logic [AW-1:0]   addr_t;
  typedef logic [DW-1:0]   word_t;
  typedef logic [DIMW-1:0] dim_t;
  typedef logic [7:0]      pix_t;

  typedef enum logic [3:0] {
    OP_END       = 4'd0,  // end of the task chain
    OP_ACQUIRE   = 4'd1,  // sensor stream -> memory (optionally copied out)
    OP_LOAD      = 4'd2,  // host FIFO -> memory
    OP_STORE     = 4'd3,  // memory -> host FIFO
    OP_MEDIAN    = 4'd4,
    OP_NIBLACK   = 4'd5,
    OP_SHAPE     = 4'd6,
    OP_TRANSPOSE = 4'd7,
    OP_HPF       = 4'd8,
    OP_DILSUB    = 4'd9
  } op_e;

  // median kernel selection (task mode field)
  typedef enum logic [1:0] {
    MED_1X3 = 2'd0,
    MED_1X5 = 2'd1,
    MED_3X3 = 2'd2
  } med_mode_e;

  typedef struct packed {
    op_e          op;
    logic [3:0]   mode;     // per-operation mode (kernel, neighbourhood)
    logic         copy_out; // broadcast the result words to the host FIFO
    addr_t        src;      // source word address
    addr_t        dst;      // destination word address
    dim_t         width;    // pixels per row of the source image
    dim_t         height;   // rows of the source image
    logic [31:0]  param;    // operation parameter (STDREF, word count, ...)
  } task_t;

  // acquisition command: window, subsampling, integration and exposures
  typedef enum logic [1:0] {
    ACQ_WINDOW   = 2'd0,  // one window
    ACQ_MULTI    = 2'd1,  // same window acquired n times
    ACQ_TRACKING = 2'd2,  // window moved by (dx,dy) between exposures
    ACQ_LINESCAN = 2'd3   // one row read repeatedly (line sensor use)
  } acq_mode_e;

  typedef struct packed {
    acq_mode_e    mode;
    dim_t         x0, y0;      // window origin on the sensor
    dim_t         w, h;        // window size in output pixels / rows
    logic [3:0]   sub_x;       // keep one column out of sub_x+1
    logic [3:0]   sub_y;       // keep one row out of sub_y+1
    logic [15:0]  t_int;       // integration time, cycles
    logic [7:0]   n_exp;       // exposures (multi/tracking) or lines (line scan)
    logic [15:0]  t_delay;     // delay between two exposures, cycles
    logic signed [7:0] dx, dy; // window translation per exposure (tracking)
  } acq_cmd_t;

  // host register map (word addresses on the host bus)
  localparam logic [7:0] REG_CTRL      = 8'h00; // w: bit0 start
  localparam logic [7:0] REG_STATUS    = 8'h01; // r: {.., out_empty, done, busy}
  localparam logic [7:0] REG_ACQ_BASE  = 8'h08; // 8 words: acquisition command
  localparam logic [7:0] REG_COEF_BASE = 8'h20; // 11 words: high pass coefficients
  localparam logic [7:0] REG_TASK_BASE = 8'h40; // 8 tasks x 8 words
  localparam logic [7:0] REG_DATA      = 8'hFF; // w: data to coprocessor, r: result data

  function automatic pix_t pix_of(word_t w, int unsigned k);
    return w[8*k +: 8];
  endfunction

endpackage
