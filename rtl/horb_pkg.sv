// horb_pkg: types, constants and small functions shared by the HORB motion
// estimation processor.
//
// Geometry. A macroblock (MB) is 16x16 pixels. The search range is
// [-16, 15] in both directions. The search area is split into 25 square
// regions of 7x7 displacements arranged 5x5 around the centre (region centres
// at multiples of 7, so displacements -17..+17 are covered); vectors outside
// [-16, 15] are never evaluated. The regions form three groups: the centre
// region (group 1), the ring of 8 around it (group 2) and the outer ring of 16
// (group 3). The 5x5 arrangement, the 7x7 region size and the three groups
// follow the document; the ring visiting order is this design's choice.
//
// Thresholds. The stop test after a region of group g is
//     SADmin < SADav * (10 - g) / 5
// and the partial SAD criterion after n MB lines is
//     partial SAD > SADav * (n + 5) / 8  ->  vector disabled.
// Both are evaluated by cross multiplication, so no division is needed.
package horb_pkg;

  localparam int PIX_W    = 8;             // pixel width
  localparam int MB       = 16;            // macroblock side, PEs, delay line taps
  localparam int RHALF    = 3;             // region half width
  localparam int RSIDE    = 2 * RHALF + 1; // 7 displacements per region side
  localparam int RPTS     = RSIDE * RSIDE; // 49 vectors per region
  localparam int RANGE    = 16;            // search range [-RANGE, RANGE-1]
  localparam int SW       = MB + 2 * RANGE; // cache side: 48 pixels
  localparam int SWA_W    = $clog2(SW * SW);
  localparam int LINE_W   = PIX_W + $clog2(MB);  // SAD_line width, 12 bits
  localparam int SAD_W    = 16;            // full SAD width (256 * 255 < 2^16)
  localparam int NMD_MSB  = 5;             // MSBs compared by the no-motion test
  localparam int NMD_PCT  = 70;            // no-motion match percentage

  typedef logic [PIX_W-1:0]        pix_t;
  typedef logic signed [5:0]       disp_t;   // displacement, -32..31
  typedef logic [SAD_W-1:0]        sad_t;
  typedef logic [LINE_W-1:0]       sadline_t;
  typedef logic [$clog2(SW)-1:0]   cpos_t;   // row or column in the cache
  typedef logic [SWA_W-1:0]        caddr_t;  // cache address row*SW+col

  // Position of a SAD_line inside the region sweep.
  typedef struct packed {
    logic [2:0] hh;    // h index in the region, 0..6
    logic [2:0] kk;    // k index in the region, 0..6
    logic [3:0] line;  // MB line i, 0..15
  } tag_t;

  // Control word from the cache AGU to the MEU, aligned with cache read data.
  typedef struct packed {
    logic fill_en;   // shift two pixels into delay line fill_sel
    logic fill_sel;
    logic run_en;    // compute one SAD_line on delay line run_sel
    logic run_sel;
    logic run_shift; // then shift one pixel into it
    tag_t tag;
    logic xswap;     // X_act <= X_next in every PE
  } meu_ctrl_t;

  // A complete SAD and its vector.
  typedef struct packed {
    logic  valid;
    disp_t h;
    disp_t k;
    sad_t  sad;
  } candidate_t;

  // Result of one macroblock.
  typedef struct packed {
    disp_t       mv_h;        // vertical displacement
    disp_t       mv_k;        // horizontal displacement
    sad_t        sad;         // its SAD
    logic        sad_valid;   // SAD computed (0 for a stationary MB)
    logic        stationary;  // halted by the no-motion test
    logic [4:0]  regions;     // regions searched
    logic [15:0] active_lines;// SAD_line computations not disabled
  } horb_result_t;

  // Region centre of entry e of ring g (g = 2: 8 regions, g = 3: 16 regions),
  // in units of RSIDE, clockwise from the top-left corner. Returned as {a, b}
  // with the centre at (h, k) = (RSIDE*a, RSIDE*b).
  function automatic logic signed [5:0] ring_a(input int g, input int e);
    logic signed [5:0] a;
    if (g == 2) begin
      case (e)
        0, 1, 2: a = -1;
        3, 7:    a = 0;
        default: a = 1;
      endcase
    end else begin
      case (e)
        0, 1, 2, 3, 4: a = -2;
        5, 15:         a = -1;
        6, 14:         a = 0;
        7, 13:         a = 1;
        default:       a = 2;
      endcase
    end
    return a;
  endfunction

  function automatic logic signed [5:0] ring_b(input int g, input int e);
    logic signed [5:0] b;
    if (g == 2) begin
      case (e)
        0, 6, 7: b = -1;
        1, 5:    b = 0;
        default: b = 1;
      endcase
    end else begin
      case (e)
        0, 12, 13, 14, 15: b = -2;
        1, 11:             b = -1;
        2, 10:             b = 0;
        3, 9:              b = 1;
        default:           b = 2;
      endcase
    end
    return b;
  endfunction

  function automatic int ring_len(input int g);
    return (g == 2) ? 8 : 16;
  endfunction

  // Ring entry whose centre is nearest (squared distance) to vector (h, k);
  // the first in ring order wins a tie.
  function automatic logic [3:0] ring_nearest(input int g, input disp_t h, input disp_t k);
    int best_d, d, dh, dk;
    logic [3:0] best_e;
    best_d = 32'h7fff_ffff;
    best_e = '0;
    for (int e = 0; e < 16; e++) begin
      if (e < ring_len(g)) begin
        dh = int'(h) - RSIDE * int'(ring_a(g, e));
        dk = int'(k) - RSIDE * int'(ring_b(g, e));
        d  = dh * dh + dk * dk;
        if (d < best_d) begin
          best_d = d;
          best_e = 4'(e);
        end
      end
    end
    return best_e;
  endfunction

endpackage
