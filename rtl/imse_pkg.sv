// imse_pkg: types and constants shared by the IMSE object detection accelerator.
//
// The accelerator evaluates Viola-Jones search windows for a host CPU. This
// package holds the APB register map (the sixteen registers of the register
// bank, in the order the block diagram lists them), the bit layout of the
// configuration, status and compressed Haar-feature words, and the struct that
// carries the window configuration from the register bank to the stage
// evaluator. The register names follow the design; their bit layouts, the
// Q16.16 scale format, the Q.12 threshold format and the six-word (24 byte)
// feature record are this implementation's own choices.
package imse_pkg;

  // ---------------------------------------------------------------- widths
  localparam int unsigned COORD_W  = 16;   // pixel coordinates and sizes
  localparam int unsigned SCALE_FB = 16;   // fraction bits of the scale factor
  localparam int unsigned THR_FB   = 12;   // fraction bits of feature thresholds
  localparam int unsigned MUL_AW   = 41;   // multiplier operand A width
  localparam int unsigned MUL_BW   = 33;   // multiplier operand B width
  localparam int unsigned MUL_PW   = MUL_AW + MUL_BW;
  localparam int unsigned FEAT_WORDS = 6;  // 32-bit words per compressed feature
  localparam int unsigned MAX_RECTS  = 3;  // rectangles per Haar-like feature

  // ---------------------------------------------------------- register map
  // Word index = APB address bits [5:2].
  typedef enum logic [3:0] {
    REG_STATUS      = 4'd0,
    REG_CONFIG      = 4'd1,
    REG_SCALE       = 4'd2,
    REG_COORD_XY    = 4'd3,
    REG_ADDR_SUM    = 4'd4,
    REG_ADDR_SQSUM  = 4'd5,
    REG_IMG_DIM     = 4'd6,
    REG_START_NODE  = 4'd7,
    REG_MUL_OP1     = 4'd8,
    REG_MUL_OP2     = 4'd9,
    REG_MUL_RES_LO  = 4'd10,
    REG_MUL_RES_HI  = 4'd11,
    REG_END_STAGE   = 4'd12,
    REG_WIN_WH      = 4'd13,
    REG_WIN_DIM     = 4'd14,
    REG_IMG_WIDTH   = 4'd15
  } reg_idx_e;

  // Config register bits
  localparam int unsigned CFG_MODE   = 0;  // 1 = face detection mode, 0 = free mode
  localparam int unsigned CFG_START  = 1;  // write 1: start command (reads as 0)
  localparam int unsigned CFG_IRQEN  = 2;  // interrupt enable

  // Status register bits
  localparam int unsigned ST_DONE    = 0;  // detection finished (write 1 to clear)
  localparam int unsigned ST_FACE    = 1;  // window passed every stage
  localparam int unsigned ST_BUSY    = 2;  // evaluation in progress
  localparam int unsigned ST_ERROR   = 3;  // window outside the image or AHB error
  // Status bits [15:8]: index of the last stage evaluated

  // Window configuration handed to the stage evaluator.
  typedef struct packed {
    logic [31:0]        scale;       // feature scale factor, Q16.16
    logic [COORD_W-1:0] win_x;       // window top-left column
    logic [COORD_W-1:0] win_y;       // window top-left row
    logic [31:0]        addr_sum;    // byte address of integral image (32-bit entries)
    logic [31:0]        addr_sqsum;  // byte address of squared integral (64-bit entries)
    logic [COORD_W-1:0] img_w;       // image width in pixels
    logic [COORD_W-1:0] img_h;       // image height in pixels
    logic [15:0]        start_node;  // byte address of first stage in shared memory
    logic [7:0]         start_stage; // number of that stage
    logic [7:0]         end_stage;   // number of the last stage to evaluate
    logic [31:0]        win_wh;      // window area W*H in pixels
    logic [COORD_W-1:0] win_w;       // window width
    logic [COORD_W-1:0] win_h;       // window height
    logic [COORD_W-1:0] stride;      // integral image row length in entries
  } win_cfg_t;

  // One rectangle of a compressed Haar-like feature (one 32-bit word).
  // A weight of zero marks an unused rectangle.
  typedef struct packed {
    logic signed [7:0] weight;
    logic [5:0]        x;
    logic [5:0]        y;
    logic [5:0]        w;
    logic [5:0]        h;
  } haar_rect_t;

  // Stage header (two words): number of features, then the stage threshold.
  typedef struct packed {
    logic [15:0] reserved;
    logic [15:0] n_features;
  } stage_hdr_t;

  // Decoded result of a window evaluation.
  typedef struct packed {
    logic       face;
    logic       error;
    logic [7:0] stage;
  } eval_result_t;

endpackage
