// wimax_pkg: constants and types shared by the IEEE 802.16e channel
// deinterleaver address generators.
//
// The deinterleaver block is viewed as a matrix of D rows and Ncbps/D
// columns (D = 16 for every block size). A generator walks the matrix row
// by row (row j outer, column i inner) and emits the write address kn of
// every received bit. The per-modulation tables below give the last column
// index, Ncbps/D - 1, for each block-size selector; the QPSK and 16-QAM
// tables are the multiplexer constants of the address generator
// schematics, the 64-QAM table is this design's own choice.
package wimax_pkg;

  // Number of matrix rows (d in the algorithms).
  localparam int unsigned D        = 16;
  // Largest coded block (Ncbps) that any mode uses, in bits.
  localparam int unsigned NCBPS_MAX = 576;
  // Width of the row and column counters and of the limit constants.
  localparam int unsigned CNT_W    = 8;
  // Width of a bit address inside one block (0 .. NCBPS_MAX-1).
  localparam int unsigned ADDR_W   = $clog2(NCBPS_MAX);

  typedef logic [CNT_W-1:0]  cnt_t;
  typedef logic [ADDR_W-1:0] addr_t;

  // Modulation of the block being deinterleaved.
  typedef enum logic [1:0] {
    MOD_QPSK  = 2'd0,
    MOD_QAM16 = 2'd1,
    MOD_QAM64 = 2'd2
  } mod_t;

  // QPSK: 3-bit selector -> last column (Ncbps 96,144,192,288,384,432,480,576).
  function automatic cnt_t qpsk_last_col(input logic [2:0] sel);
    case (sel)
      3'd0:    return cnt_t'(5);
      3'd1:    return cnt_t'(8);
      3'd2:    return cnt_t'(11);
      3'd3:    return cnt_t'(17);
      3'd4:    return cnt_t'(23);
      3'd5:    return cnt_t'(26);
      3'd6:    return cnt_t'(29);
      default: return cnt_t'(35);
    endcase
  endfunction

  // 16-QAM: 2-bit selector -> last column (Ncbps 192,288,384,576).
  function automatic cnt_t qam16_last_col(input logic [1:0] sel);
    case (sel)
      2'd0:    return cnt_t'(11);
      2'd1:    return cnt_t'(17);
      2'd2:    return cnt_t'(23);
      default: return cnt_t'(35);
    endcase
  endfunction

  // 64-QAM: 2-bit selector -> last column (Ncbps 144,288,432,576). Every
  // entry gives a column count that is a multiple of 3.
  function automatic cnt_t qam64_last_col(input logic [1:0] sel);
    case (sel)
      2'd0:    return cnt_t'(8);
      2'd1:    return cnt_t'(17);
      2'd2:    return cnt_t'(26);
      default: return cnt_t'(35);
    endcase
  endfunction

endpackage
