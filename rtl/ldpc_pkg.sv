// Shared constants, types and constant functions of the partly parallel
// (3,6)-regular LDPC decoder.
//
// The code is defined by an 18 x 36 base matrix (each row lists the six base
// columns it checks). Each 1 of the base matrix is expanded into an L x L
// identity matrix whose columns are cyclically shifted by
// P(i,j) = ((i-1)*j) mod L, with i and j the 1-based base row and column, so
// row r of that block checks column (r + P) mod L. With L = 256 this gives the
// 4608 x 9216 rate-1/2 parity check matrix of the main configuration.
//
// Messages are fixed point with 5 fractional bits. A check-to-variable message
// is 8-bit sign-magnitude (1 sign bit, 7 magnitude bits). A variable-to-check
// message travels as a 9-bit "hybrid" word: the variable's current hard
// decision plus the 8-bit sign-magnitude message. The intrinsic message
// (channel log-likelihood ratio) is 8-bit two's complement.
//
// The function f(x) = ln((1+e^-x)/(1-e^-x)) used by both node units is held
// in a 170-entry, 7-bit table computed here at elaboration:
//   entry(x) = min(127, round(32 * f(x/32))), entry(0) = 127,
// and inputs of 170 or more read 0 (f is below 1/64 there).
//
// The base matrix, the shift rule, the word widths, the 170 x 7 table size and
// the 10-iteration limit follow the source design. The bit order inside the
// hybrid word, the rounding of the table and the saturation of the intrinsic
// message to 8 bits are this design's choices.
package ldpc_pkg;

  localparam int unsigned MB       = 18;   // base matrix rows = number of CNUs
  localparam int unsigned NB       = 36;   // base matrix columns = number of PEs/VNUs
  localparam int unsigned DV       = 3;    // variable node degree
  localparam int unsigned DC       = 6;    // check node degree
  localparam int unsigned FRAC_W   = 5;    // fractional bits of every message
  localparam int unsigned MAG_W    = 7;    // magnitude bits of a message
  localparam int unsigned MSG_W    = 8;    // sign-magnitude message
  localparam int unsigned HYB_W    = 9;    // hard decision + message
  localparam int unsigned INTR_W   = 8;    // intrinsic message, two's complement
  localparam int unsigned LUT_DEPTH = 170; // entries of the f(x) table
  localparam int unsigned PIPE_LAT = 2;    // read-to-write latency of a phase

  typedef struct packed {
    logic             sign;  // 1: negative (bit more likely 1)
    logic [MAG_W-1:0] mag;
  } msg_t;

  typedef struct packed {
    logic hd;                // hard decision of the sending variable node
    msg_t msg;
  } hyb_t;

  typedef logic signed [INTR_W-1:0] llr_t;

  typedef enum logic [1:0] {
    PH_IDLE  = 2'd0,
    PH_INIT  = 2'd1,  // load intrinsic messages, write initial v2c messages
    PH_CHECK = 2'd2,  // check node processing
    PH_VAR   = 2'd3   // variable node processing
  } phase_e;

  // One pipeline stage of the decoder's read-compute-write sequence.
  typedef struct packed {
    logic   valid;
    phase_e phase;
  } stage_t;

  // Base matrix, one row per check node group: the six base columns (0-based),
  // in increasing order. The ranges ascend on purpose so that BASE_COLS[i][p]
  // reads in the order the rows are listed.
  typedef logic [0:MB-1][0:DC-1][5:0] row_cols_t;
  localparam row_cols_t BASE_COLS = {
    {6'd4, 6'd5, 6'd6, 6'd17, 6'd24, 6'd32},
    {6'd3, 6'd5, 6'd12, 6'd14, 6'd22, 6'd34},
    {6'd1, 6'd6, 6'd12, 6'd17, 6'd27, 6'd35},
    {6'd2, 6'd9, 6'd10, 6'd25, 6'd31, 6'd33},
    {6'd7, 6'd10, 6'd11, 6'd28, 6'd29, 6'd35},
    {6'd11, 6'd15, 6'd19, 6'd20, 6'd26, 6'd27},
    {6'd1, 6'd2, 6'd29, 6'd30, 6'd32, 6'd35},
    {6'd8, 6'd13, 6'd22, 6'd23, 6'd28, 6'd31},
    {6'd0, 6'd1, 6'd3, 6'd17, 6'd23, 6'd24},
    {6'd8, 6'd9, 6'd15, 6'd18, 6'd23, 6'd26},
    {6'd10, 6'd18, 6'd20, 6'd25, 6'd31, 6'd34},
    {6'd19, 6'd25, 6'd27, 6'd28, 6'd30, 6'd33},
    {6'd2, 6'd4, 6'd9, 6'd16, 6'd20, 6'd21},
    {6'd7, 6'd11, 6'd13, 6'd21, 6'd24, 6'd26},
    {6'd0, 6'd3, 6'd13, 6'd14, 6'd15, 6'd16},
    {6'd0, 6'd4, 6'd5, 6'd6, 6'd12, 6'd30},
    {6'd14, 6'd16, 6'd18, 6'd21, 6'd22, 6'd34},
    {6'd7, 6'd8, 6'd19, 6'd29, 6'd32, 6'd33}
  };

  // Row of the k-th (k = 0..2, increasing row order) 1 in base column j.
  // RAM k+1 of PE j holds the messages exchanged with that check node group.
  function automatic int unsigned col_row(int unsigned j, int unsigned k);
    int unsigned n = 0;
    int unsigned r = 0;
    for (int unsigned i = 0; i < MB; i++)
      for (int unsigned p = 0; p < DC; p++)
        if (32'(BASE_COLS[i][p]) == j) begin
          if (n == k) r = i;
          n++;
        end
    return r;
  endfunction

  // Which RAM (0..2) of PE BASE_COLS[i][p] serves input p of CNU i.
  function automatic int unsigned edge_ram(int unsigned i, int unsigned p);
    int unsigned j = 32'(BASE_COLS[i][p]);
    int unsigned k = 0;
    for (int unsigned kk = 0; kk < DV; kk++)
      if (col_row(j, kk) == i) k = kk;
    return k;
  endfunction

  // Cyclic shift of the circulant at 0-based base position (i, j).
  function automatic int unsigned shift_of(int unsigned i, int unsigned j, int unsigned l);
    return (i * (j + 1)) % l;
  endfunction

  // Table value of f at x/32, 7 bits, 5 fractional bits.
  function automatic logic [MAG_W-1:0] f_entry(int unsigned x);
    real xr, v;
    if (x == 0 || x >= LUT_DEPTH) return (x == 0) ? '1 : '0;
    xr = real'(x) / real'(1 << FRAC_W);
    v  = real'(1 << FRAC_W) * $ln((1.0 + $exp(-xr)) / (1.0 - $exp(-xr)));
    if (v > 127.0) v = 127.0;
    return MAG_W'(int'(v));
  endfunction

endpackage
