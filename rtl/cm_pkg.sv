// cm_pkg: types and constants shared by the pass-pipelined JPEG2000 context
// modeler (EBCOT tier-1 context formation).
//
// Context labels follow the usual 19-context numbering of JPEG2000 tier-1:
// 0..8 zero coding, 9..13 sign coding, 14..16 magnitude refinement,
// 17 run-length, 18 uniform. Sign bits are 1 for negative coefficients.
// Subband codes: 0 = LL, 1 = HL, 2 = LH, 3 = HH.
//
// The lane counts (8 SPP + 4 MRP + 10 CUP = 22 pairs per cycle) follow the
// worst case of each coding pass when all three passes run side by side.
package cm_pkg;

  localparam int unsigned SPP_LANES = 8;   // 4 x (ZC + SC)
  localparam int unsigned MRP_LANES = 4;   // 4 x MR
  localparam int unsigned CUP_LANES = 10;  // RL + 2 UNI + SC + 3 x (ZC + SC)
  localparam int unsigned WIN_COLS  = 7;   // process window, columns j = 0..6
  localparam int unsigned POS_SPP   = 1;   // window column of each pass
  localparam int unsigned POS_MRP   = 3;
  localparam int unsigned POS_CUP   = 5;

  localparam logic [4:0] CX_RL  = 5'd17;
  localparam logic [4:0] CX_UNI = 5'd18;

  typedef enum logic [1:0] {BAND_LL = 2'd0, BAND_HL = 2'd1, BAND_LH = 2'd2, BAND_HH = 2'd3} band_e;
  typedef enum logic [1:0] {PASS_SPP = 2'd0, PASS_MRP = 2'd1, PASS_CUP = 2'd2} pass_e;

  // one context-data pair
  typedef struct packed {
    logic [4:0] cx;
    logic       d;
  } cxd_t;

  // significance / sign of the eight neighbours of one sample, as seen by
  // one coding pass. Index 0 = left/up side, 1 = right/down side.
  typedef struct packed {
    logic [1:0] h_sig;   // [0] left (column c-1), [1] right (column c+1)
    logic [1:0] h_sgn;
    logic [1:0] v_sig;   // [0] above, [1] below
    logic [1:0] v_sgn;
    logic [3:0] d_sig;   // diagonal neighbours
  } nbr_t;

  // what the context generation stage hands to the primitive operators for
  // one sample of one pass
  typedef struct packed {
    logic coded;    // pass flag: the sample is coded in this pass
    logic bit_v;    // magnitude bit of the current bit-plane
    logic sign;     // sign of the coefficient
    logic refined;  // sigma': refined in an earlier bit-plane (MRP only)
    nbr_t nb;
  } row_info_t;

  // one stripe column of one pass, entering the primitive operator stage
  typedef struct packed {
    logic            valid;
    logic [4:0]      bp;        // bit-plane index
    logic            pass_end;  // last column of this pass in this bit-plane
    logic            cb_end;    // ... and that bit-plane is the code block's last
    band_e           band;
    logic            run;       // CUP only: run-length mode for this column
    row_info_t [3:0] rows;
  } pass_info_t;

  // tag issued by the control unit with every stripe column it reads
  typedef struct packed {
    logic       valid;
    logic       first;     // column 0 of its stripe
    logic       last;      // last column of its stripe
    logic       top;       // stripe 0: nothing above it
    logic       first_bp;  // first coded bit-plane: state memory not yet valid
    logic [4:0] bp;
    logic       pass_end;  // last stripe column of the bit-plane
    logic       cb_end;    // ... of the last bit-plane of the code block
    band_e      band;
  } col_tag_t;

  // tag that travels with every pass's lane group at the output
  typedef struct packed {
    logic       valid;
    logic [4:0] bp;
    logic       pass_end;
    logic       cb_end;
  } grp_tag_t;

endpackage
