// Shared types and constants of the scalable/multi-view video decoder.
//
// The reference pixel cache line holds 8x2 luma pixels plus the 4x1 Cb and
// 4x1 Cr pixels that belong to the same area, so one tag covers luma and
// chroma. Line coordinates (xl, yl) count cache lines: xl = x_pixel / 8,
// yl = y_pixel / 2. A reference picture is named by its list (0 forward,
// 1 backward) and its index in that list. The line size, the 64 cache banks
// and the two ways come from the published design; the coordinate widths are
// sized here for a 4096x2160 picture, the largest format the chip decodes.
package svcd_pkg;

  localparam int unsigned LINE_W     = 8;   // luma pixels per line, horizontally
  localparam int unsigned LINE_H     = 2;   // luma rows per line
  localparam int unsigned LINE_BITS  = (LINE_W*LINE_H + 2*(LINE_W/2)) * 8; // 16 Y + 4 Cb + 4 Cr bytes
  localparam int unsigned XL_BITS    = 9;   // 4096 / 8  = 512 line columns
  localparam int unsigned YL_BITS    = 11;  // 2160 / 2  = 1080 line rows
  localparam int unsigned REF_BITS   = 4;   // up to 16 reference pictures per list

  typedef logic [LINE_BITS-1:0] line_t;

  // Identification of one cache line of a reference picture.
  typedef struct packed {
    logic                list;   // 0: forward list, 1: backward list
    logic [REF_BITS-1:0] ref_idx;
    logic [YL_BITS-1:0]  yl;
    logic [XL_BITS-1:0]  xl;
  } line_addr_t;

  // DRAM commands issued by the controller.
  typedef enum logic [2:0] {
    DRAM_NOP = 3'd0,
    DRAM_ACT = 3'd1,
    DRAM_PRE = 3'd2,
    DRAM_RD  = 3'd3
  } dram_cmd_e;

endpackage
