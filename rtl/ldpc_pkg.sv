// Shared types, constants and code tables of the three-mode 802.11n rate-1/2 LDPC decoder.
//
// The parity check matrix of each mode is a 12 x 24 array of Z x Z sub-blocks; a sub-block is
// either all-zero or an identity matrix cyclically shifted right by s, so that check j of the
// block row connects to bit (j + s) mod Z of the block column. Z is 27, 54 or 81 (codeword
// lengths 648, 1296, 1944). The base matrices are those of the IEEE 802.11n standard.
//
// All tables below are given in the reordered row and column order the decoder works in. The
// rows and columns are permuted so that the first four block rows have no nonzero sub-block in
// block columns 16..23 and the last four block rows none in block columns 0..7; that zero
// structure is what lets the check node phase of one row group run at the same time as the
// bit node phase of one column group. For Z=81 the order is the one of the published
// reordered matrix; for Z=27 and Z=54 an order with the same zero structure was chosen here.
// Reordering rows and columns does not change the code: the decoder maps the standard bit order
// onto the reordered columns when it loads LLRs and back when it outputs decisions.
//
//   SLOT_COL  [mode][row][slot]  reordered block column of the slot-th nonzero block of a row, -1 none
//   SLOT_SHIFT[mode][row][slot]  its cyclic shift s
//   ROW_DEG   [mode][row]        number of nonzero blocks of a row (7 or 8)
//   COL_SLOT  [mode][col][row]   slot of block (row, col) within its row, -1 if the block is zero
//   ORIG_COL  [mode][col]        standard block column of reordered column col
//   NEW_COL   [mode][orig]       reordered block column of standard block column orig
//   ORIG_ROW  [mode][row]        standard block row of reordered row row (documentation only)
package ldpc_pkg;

  localparam int W      = 8;    // message and LLR width, signed Q4.4 (4 integer, 4 fraction bits)
  localparam int ZMAX   = 81;   // largest sub-block size
  localparam int NB     = 24;   // block columns
  localparam int MB     = 12;   // block rows
  localparam int DMAX   = 8;    // largest row degree
  localparam int NCNU   = 4;    // check node units (one block row each)
  localparam int NBNU   = 8;    // bit node units (one block column each)
  localparam int NGRP   = 3;    // row groups and column groups
  localparam int ZW     = $clog2(ZMAX);
  localparam int NMAX   = NB * ZMAX;

  typedef enum logic [1:0] {
    MODE_Z27 = 2'd0,
    MODE_Z54 = 2'd1,
    MODE_Z81 = 2'd2
  } mode_e;

  typedef logic signed [W-1:0] msg_t;

  localparam int SLOT_COL   [3][MB][DMAX] = '{'{'{2, 3, 8, 10, 11, 14, 15, -1}, '{3, 4, 8, 9, 10, 12, 13, 14}, '{0, 1, 4, 5, 8, 10, 14, -1}, '{1, 2, 6, 7, 8, 10, 14, -1}, '{5, 6, 8, 10, 14, 16, 17, -1}, '{0, 7, 8, 10, 12, 14, 16, 18}, '{1, 2, 8, 10, 14, 21, 23, -1}, '{0, 8, 10, 11, 13, 14, 22, 23}, '{8, 10, 14, 15, 17, 18, 19, -1}, '{8, 9, 10, 12, 14, 19, 20, -1}, '{8, 9, 10, 11, 14, 16, 20, 21}, '{8, 10, 13, 14, 15, 17, 22, -1}}, '{'{1, 3, 4, 8, 10, 12, 13, -1}, '{0, 4, 5, 8, 10, 11, 13, 14}, '{0, 2, 5, 6, 8, 10, 12, -1}, '{1, 6, 8, 9, 10, 13, 15, -1}, '{0, 3, 8, 11, 13, 19, 20, -1}, '{2, 8, 9, 10, 13, 21, 22, -1}, '{0, 1, 7, 10, 13, 17, 23, -1}, '{2, 3, 7, 8, 10, 13, 16, -1}, '{8, 10, 11, 13, 15, 17, 18, -1}, '{8, 9, 10, 13, 14, 18, 19, -1}, '{8, 10, 12, 13, 16, 17, 20, 21}, '{8, 10, 13, 14, 16, 22, 23, -1}}, '{'{0, 1, 2, 8, 9, 10, 15, -1}, '{3, 6, 7, 8, 9, 10, 13, -1}, '{1, 4, 5, 8, 9, 11, 14, -1}, '{5, 6, 8, 10, 11, 12, 14, -1}, '{2, 3, 4, 8, 9, 10, 16, 17}, '{1, 7, 8, 9, 10, 13, 18, -1}, '{0, 2, 9, 10, 11, 16, 18, 19}, '{0, 3, 8, 9, 10, 19, 20, -1}, '{8, 9, 10, 14, 17, 20, 21, -1}, '{8, 9, 10, 11, 17, 21, 22, -1}, '{8, 9, 10, 12, 13, 22, 23, -1}, '{8, 9, 10, 12, 15, 16, 23, -1}}};
  localparam int SLOT_SHIFT [3][MB][DMAX] = '{'{'{0, 0, 0, 0, 0, 0, 1, -1}, '{0, 0, 22, 0, 17, 0, 0, 12}, '{0, 0, 0, 0, 6, 10, 24, -1}, '{9, 11, 0, 0, 23, 3, 0, -1}, '{0, 0, 2, 20, 25, 0, 0, -1}, '{23, 0, 24, 17, 3, 10, 1, 0}, '{3, 17, 11, 19, 13, 0, 0, -1}, '{8, 25, 23, 18, 14, 9, 0, 0}, '{25, 8, 7, 0, 18, 0, 0, -1}, '{13, 24, 0, 8, 6, 0, 0, -1}, '{7, 20, 22, 10, 23, 16, 0, 0}, '{3, 16, 2, 25, 1, 5, 0, -1}}, '{'{23, 1, 0, 40, 22, 49, 43, -1}, '{1, 0, 0, 50, 48, 35, 13, 30}, '{50, 49, 0, 0, 39, 4, 2, -1}, '{4, 0, 33, 38, 37, 1, 0, -1}, '{11, 0, 47, 17, 51, 0, 0, -1}, '{46, 33, 34, 24, 23, 0, 0, -1}, '{18, 8, 0, 23, 0, 35, 0, -1}, '{19, 1, 0, 49, 30, 34, 17, -1}, '{45, 0, 22, 20, 0, 42, 0, -1}, '{51, 48, 35, 44, 18, 0, 0, -1}, '{5, 6, 45, 13, 25, 40, 0, 0}, '{1, 1, 38, 44, 27, 0, 0, -1}}, '{'{11, 79, 1, 50, 57, 50, 0, -1}, '{32, 0, 0, 14, 64, 30, 52, -1}, '{12, 0, 0, 35, 2, 56, 57, -1}, '{0, 0, 0, 77, 45, 9, 70, -1}, '{1, 16, 0, 60, 24, 51, 61, 27}, '{27, 0, 38, 65, 72, 57, 0, -1}, '{56, 0, 69, 52, 79, 79, 0, 0}, '{42, 8, 8, 0, 50, 0, 0, -1}, '{66, 40, 28, 20, 22, 0, 0, -1}, '{53, 62, 35, 53, 3, 0, 0, -1}, '{24, 30, 56, 14, 37, 0, 0, -1}, '{0, 3, 55, 7, 0, 28, 0, -1}}};
  localparam int ROW_DEG    [3][MB]       = '{'{7, 8, 7, 7, 7, 8, 7, 8, 7, 7, 8, 7}, '{7, 8, 7, 7, 7, 7, 7, 7, 7, 7, 8, 7}, '{7, 7, 7, 7, 8, 7, 8, 7, 7, 7, 7, 7}};
  localparam int COL_SLOT   [3][NB][MB]   = '{'{'{-1, -1, 0, -1, -1, 0, -1, 0, -1, -1, -1, -1}, '{-1, -1, 1, 0, -1, -1, 0, -1, -1, -1, -1, -1}, '{0, -1, -1, 1, -1, -1, 1, -1, -1, -1, -1, -1}, '{1, 0, -1, -1, -1, -1, -1, -1, -1, -1, -1, -1}, '{-1, 1, 2, -1, -1, -1, -1, -1, -1, -1, -1, -1}, '{-1, -1, 3, -1, 0, -1, -1, -1, -1, -1, -1, -1}, '{-1, -1, -1, 2, 1, -1, -1, -1, -1, -1, -1, -1}, '{-1, -1, -1, 3, -1, 1, -1, -1, -1, -1, -1, -1}, '{2, 2, 4, 4, 2, 2, 2, 1, 0, 0, 0, 0}, '{-1, 3, -1, -1, -1, -1, -1, -1, -1, 1, 1, -1}, '{3, 4, 5, 5, 3, 3, 3, 2, 1, 2, 2, 1}, '{4, -1, -1, -1, -1, -1, -1, 3, -1, -1, 3, -1}, '{-1, 5, -1, -1, -1, 4, -1, -1, -1, 3, -1, -1}, '{-1, 6, -1, -1, -1, -1, -1, 4, -1, -1, -1, 2}, '{5, 7, 6, 6, 4, 5, 4, 5, 2, 4, 4, 3}, '{6, -1, -1, -1, -1, -1, -1, -1, 3, -1, -1, 4}, '{-1, -1, -1, -1, 5, 6, -1, -1, -1, -1, 5, -1}, '{-1, -1, -1, -1, 6, -1, -1, -1, 4, -1, -1, 5}, '{-1, -1, -1, -1, -1, 7, -1, -1, 5, -1, -1, -1}, '{-1, -1, -1, -1, -1, -1, -1, -1, 6, 5, -1, -1}, '{-1, -1, -1, -1, -1, -1, -1, -1, -1, 6, 6, -1}, '{-1, -1, -1, -1, -1, -1, 5, -1, -1, -1, 7, -1}, '{-1, -1, -1, -1, -1, -1, -1, 6, -1, -1, -1, 6}, '{-1, -1, -1, -1, -1, -1, 6, 7, -1, -1, -1, -1}}, '{'{-1, 0, 0, -1, 0, -1, 0, -1, -1, -1, -1, -1}, '{0, -1, -1, 0, -1, -1, 1, -1, -1, -1, -1, -1}, '{-1, -1, 1, -1, -1, 0, -1, 0, -1, -1, -1, -1}, '{1, -1, -1, -1, 1, -1, -1, 1, -1, -1, -1, -1}, '{2, 1, -1, -1, -1, -1, -1, -1, -1, -1, -1, -1}, '{-1, 2, 2, -1, -1, -1, -1, -1, -1, -1, -1, -1}, '{-1, -1, 3, 1, -1, -1, -1, -1, -1, -1, -1, -1}, '{-1, -1, -1, -1, -1, -1, 2, 2, -1, -1, -1, -1}, '{3, 3, 4, 2, 2, 1, -1, 3, 0, 0, 0, 0}, '{-1, -1, -1, 3, -1, 2, -1, -1, -1, 1, -1, -1}, '{4, 4, 5, 4, -1, 3, 3, 4, 1, 2, 1, 1}, '{-1, 5, -1, -1, 3, -1, -1, -1, 2, -1, -1, -1}, '{5, -1, 6, -1, -1, -1, -1, -1, -1, -1, 2, -1}, '{6, 6, -1, 5, 4, 4, 4, 5, 3, 3, 3, 2}, '{-1, 7, -1, -1, -1, -1, -1, -1, -1, 4, -1, 3}, '{-1, -1, -1, 6, -1, -1, -1, -1, 4, -1, -1, -1}, '{-1, -1, -1, -1, -1, -1, -1, 6, -1, -1, 4, 4}, '{-1, -1, -1, -1, -1, -1, 5, -1, 5, -1, 5, -1}, '{-1, -1, -1, -1, -1, -1, -1, -1, 6, 5, -1, -1}, '{-1, -1, -1, -1, 5, -1, -1, -1, -1, 6, -1, -1}, '{-1, -1, -1, -1, 6, -1, -1, -1, -1, -1, 6, -1}, '{-1, -1, -1, -1, -1, 5, -1, -1, -1, -1, 7, -1}, '{-1, -1, -1, -1, -1, 6, -1, -1, -1, -1, -1, 5}, '{-1, -1, -1, -1, -1, -1, 6, -1, -1, -1, -1, 6}}, '{'{0, -1, -1, -1, -1, -1, 0, 0, -1, -1, -1, -1}, '{1, -1, 0, -1, -1, 0, -1, -1, -1, -1, -1, -1}, '{2, -1, -1, -1, 0, -1, 1, -1, -1, -1, -1, -1}, '{-1, 0, -1, -1, 1, -1, -1, 1, -1, -1, -1, -1}, '{-1, -1, 1, -1, 2, -1, -1, -1, -1, -1, -1, -1}, '{-1, -1, 2, 0, -1, -1, -1, -1, -1, -1, -1, -1}, '{-1, 1, -1, 1, -1, -1, -1, -1, -1, -1, -1, -1}, '{-1, 2, -1, -1, -1, 1, -1, -1, -1, -1, -1, -1}, '{3, 3, 3, 2, 3, 2, -1, 2, 0, 0, 0, 0}, '{4, 4, 4, -1, 4, 3, 2, 3, 1, 1, 1, 1}, '{5, 5, -1, 3, 5, 4, 3, 4, 2, 2, 2, 2}, '{-1, -1, 5, 4, -1, -1, 4, -1, -1, 3, -1, -1}, '{-1, -1, -1, 5, -1, -1, -1, -1, -1, -1, 3, 3}, '{-1, 6, -1, -1, -1, 5, -1, -1, -1, -1, 4, -1}, '{-1, -1, 6, 6, -1, -1, -1, -1, 3, -1, -1, -1}, '{6, -1, -1, -1, -1, -1, -1, -1, -1, -1, -1, 4}, '{-1, -1, -1, -1, 6, -1, 5, -1, -1, -1, -1, 5}, '{-1, -1, -1, -1, 7, -1, -1, -1, 4, 4, -1, -1}, '{-1, -1, -1, -1, -1, 6, 6, -1, -1, -1, -1, -1}, '{-1, -1, -1, -1, -1, -1, 7, 5, -1, -1, -1, -1}, '{-1, -1, -1, -1, -1, -1, -1, 6, 5, -1, -1, -1}, '{-1, -1, -1, -1, -1, -1, -1, -1, 6, 5, -1, -1}, '{-1, -1, -1, -1, -1, -1, -1, -1, -1, 6, 5, -1}, '{-1, -1, -1, -1, -1, -1, -1, -1, -1, -1, 6, 6}}};
  localparam int ORIG_COL   [3][NB]       = '{'{2, 10, 11, 13, 14, 15, 16, 17, 0, 1, 4, 5, 6, 7, 8, 12, 3, 9, 18, 19, 20, 21, 23, 22}, '{1, 7, 11, 12, 13, 14, 15, 23, 0, 3, 4, 5, 6, 8, 10, 16, 2, 9, 17, 18, 19, 20, 21, 22}, '{6, 10, 12, 11, 23, 22, 21, 20, 4, 0, 8, 1, 9, 5, 3, 13, 2, 7, 19, 18, 17, 16, 15, 14}};
  localparam int NEW_COL    [3][NB]       = '{'{8, 9, 0, 16, 10, 11, 12, 13, 14, 17, 1, 2, 15, 3, 4, 5, 6, 7, 18, 19, 20, 21, 23, 22}, '{8, 0, 16, 9, 10, 11, 12, 1, 13, 17, 14, 2, 3, 4, 5, 6, 15, 18, 19, 20, 21, 22, 23, 7}, '{9, 11, 16, 14, 8, 13, 0, 17, 10, 12, 1, 3, 2, 15, 23, 22, 21, 20, 19, 18, 7, 6, 5, 4}};
  localparam int ORIG_ROW   [3][MB]       = '{'{0, 1, 2, 4, 3, 5, 9, 10, 6, 7, 8, 11}, '{0, 1, 2, 3, 6, 8, 10, 11, 4, 5, 7, 9}, '{0, 8, 10, 9, 11, 7, 6, 5, 4, 3, 2, 1}};

  // Sub-block size of a mode.
  function automatic logic [ZW-1:0] mode_z(input mode_e m);
    case (m)
      MODE_Z27: return ZW'(27);
      MODE_Z54: return ZW'(54);
      default:  return ZW'(81);
    endcase
  endfunction

  // Saturate a wide signed value to a message.
  function automatic msg_t sat_msg(input logic signed [15:0] v);
    if (v > 16'sd127)       return msg_t'(8'sd127);
    else if (v < -16'sd128) return msg_t'(-8'sd128);
    else                    return msg_t'(v[W-1:0]);
  endfunction

endpackage
