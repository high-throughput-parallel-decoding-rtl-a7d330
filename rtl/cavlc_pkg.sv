// cavlc_pkg: types, constants and code tables shared by the CAVLC decoder.
//
// The decoder analyses M = 8 stream bits per cycle for the Level and Run_before
// steps and keeps a 28-bit window, the length of the longest baseline-profile
// Level codeword (15-zero prefix, one, 12-bit suffix).  The 4-bit State_select
// encoding below is the document's Table 1.  The variable-length code tables for
// Coeff_token and Total_zeros are those of the H.264/AVC standard (the document
// names but does not print them); they are stored as (length, value) pairs so
// the decoders can match them with plain comparators.
package cavlc_pkg;

  localparam int PAR_BITS = 8;   // M: bits analysed in parallel
  localparam int WIN      = 28;  // window width presented by the barrel shifter

  typedef logic signed [15:0] level_t;

  // State_select, Table 1 of the design description.
  typedef enum logic [3:0] {
    SS_NUM_VLC0   = 4'b0000,
    SS_NUM_VLC1   = 4'b0001,
    SS_NUM_VLC2   = 4'b0010,
    SS_NUM_VLC_DC = 4'b0011,
    SS_T1         = 4'b0100,
    SS_TZ         = 4'b0110,
    SS_TZ_DC      = 4'b0111,
    SS_LEVEL0     = 4'b1000,
    SS_LEVEL1     = 4'b1001,
    SS_LEVEL2     = 4'b1010,
    SS_LEVEL3     = 4'b1011,
    SS_LEVEL4     = 4'b1100,
    SS_LEVEL5     = 4'b1101,
    SS_LEVEL6     = 4'b1110,
    SS_RUN        = 4'b1111
  } state_select_t;

  typedef enum logic [2:0] {
    ST_IDLE, ST_COEFF_TOKEN, ST_TRAILING_ONES, ST_LEVEL, ST_TOTAL_ZEROS, ST_RUN_BEFORE, ST_DONE
  } step_t;

  // Mode signal: what kind of residual block follows and the nonzero counts of
  // its upper and left neighbours (N_u, N_l).
  typedef struct packed {
    logic       chroma_dc;    // 2x2 chroma DC block: 4 coefficients, DC tables
    logic       ac;           // AC block: 15 coefficients
    logic       upper_avail;
    logic       left_avail;
    logic [4:0] n_upper;
    logic [4:0] n_left;
  } mode_t;

  // Coeff_token tables, index = TotalCoeff*4 + TrailingOnes; length 0 = no code.
  // Rows: 0 <= N < 2, 2 <= N < 4, 4 <= N < 8, N >= 8 (6-bit fixed length).
  localparam logic [4:0] CT_LEN [272] = '{
    1, 0, 0, 0, 6, 2, 0, 0, 8, 6, 3, 0, 9, 8, 7, 5,
    10, 9, 8, 6, 11, 10, 9, 7, 13, 11, 10, 8, 13, 13, 11, 9,
    13, 13, 13, 10, 14, 14, 13, 11, 14, 14, 14, 13, 15, 15, 14, 14,
    15, 15, 15, 14, 16, 15, 15, 15, 16, 16, 16, 15, 16, 16, 16, 16,
    16, 16, 16, 16, 2, 0, 0, 0, 6, 2, 0, 0, 6, 5, 3, 0,
    7, 6, 6, 4, 8, 6, 6, 4, 8, 7, 7, 5, 9, 8, 8, 6,
    11, 9, 9, 6, 11, 11, 11, 7, 12, 11, 11, 9, 12, 12, 12, 11,
    12, 12, 12, 11, 13, 13, 13, 12, 13, 13, 13, 13, 13, 14, 13, 13,
    14, 14, 14, 13, 14, 14, 14, 14, 4, 0, 0, 0, 6, 4, 0, 0,
    6, 5, 4, 0, 6, 5, 5, 4, 7, 5, 5, 4, 7, 5, 5, 4,
    7, 6, 6, 4, 7, 6, 6, 4, 8, 7, 7, 5, 8, 8, 7, 6,
    9, 8, 8, 7, 9, 9, 8, 8, 9, 9, 9, 8, 10, 9, 9, 9,
    10, 10, 10, 10, 10, 10, 10, 10, 10, 10, 10, 10, 6, 0, 0, 0,
    6, 6, 0, 0, 6, 6, 6, 0, 6, 6, 6, 6, 6, 6, 6, 6,
    6, 6, 6, 6, 6, 6, 6, 6, 6, 6, 6, 6, 6, 6, 6, 6,
    6, 6, 6, 6, 6, 6, 6, 6, 6, 6, 6, 6, 6, 6, 6, 6,
    6, 6, 6, 6, 6, 6, 6, 6, 6, 6, 6, 6, 6, 6, 6, 6
  };
  localparam logic [15:0] CT_BITS [272] = '{
    1, 0, 0, 0, 5, 1, 0, 0, 7, 4, 1, 0, 7, 6, 5, 3,
    7, 6, 5, 3, 7, 6, 5, 4, 15, 6, 5, 4, 11, 14, 5, 4,
    8, 10, 13, 4, 15, 14, 9, 4, 11, 10, 13, 12, 15, 14, 9, 12,
    11, 10, 13, 8, 15, 1, 9, 12, 11, 14, 13, 8, 7, 10, 9, 12,
    4, 6, 5, 8, 3, 0, 0, 0, 11, 2, 0, 0, 7, 7, 3, 0,
    7, 10, 9, 5, 7, 6, 5, 4, 4, 6, 5, 6, 7, 6, 5, 8,
    15, 6, 5, 4, 11, 14, 13, 4, 15, 10, 9, 4, 11, 14, 13, 12,
    8, 10, 9, 8, 15, 14, 13, 12, 11, 10, 9, 12, 7, 11, 6, 8,
    9, 8, 10, 1, 7, 6, 5, 4, 15, 0, 0, 0, 15, 14, 0, 0,
    11, 15, 13, 0, 8, 12, 14, 12, 15, 10, 11, 11, 11, 8, 9, 10,
    9, 14, 13, 9, 8, 10, 9, 8, 15, 14, 13, 13, 11, 14, 10, 12,
    15, 10, 13, 12, 11, 14, 9, 12, 8, 10, 13, 8, 13, 7, 9, 12,
    9, 12, 11, 10, 5, 8, 7, 6, 1, 4, 3, 2, 3, 0, 0, 0,
    0, 1, 0, 0, 4, 5, 6, 0, 8, 9, 10, 11, 12, 13, 14, 15,
    16, 17, 18, 19, 20, 21, 22, 23, 24, 25, 26, 27, 28, 29, 30, 31,
    32, 33, 34, 35, 36, 37, 38, 39, 40, 41, 42, 43, 44, 45, 46, 47,
    48, 49, 50, 51, 52, 53, 54, 55, 56, 57, 58, 59, 60, 61, 62, 63
  };
  // Chroma DC Coeff_token table, index = TotalCoeff*4 + TrailingOnes.
  localparam logic [4:0] CTDC_LEN [20] = '{
    2, 0, 0, 0, 6, 1, 0, 0, 6, 6, 3, 0, 6, 7, 7, 6, 6, 8, 8, 7
  };
  localparam logic [15:0] CTDC_BITS [20] = '{
    1, 0, 0, 0, 7, 1, 0, 0, 4, 6, 1, 0, 3, 3, 2, 5, 2, 3, 2, 0
  };
  // Total_zeros tables: row = TotalCoeff-1 (16 entries per row), column = TotalZeros.
  localparam logic [3:0] TZ_LEN [240] = '{
    1, 3, 3, 4, 4, 5, 5, 6, 6, 7, 7, 8, 8, 9, 9, 9,
    3, 3, 3, 3, 3, 4, 4, 4, 4, 5, 5, 6, 6, 6, 6, 0,
    4, 3, 3, 3, 4, 4, 3, 3, 4, 5, 5, 6, 5, 6, 0, 0,
    5, 3, 4, 4, 3, 3, 3, 4, 3, 4, 5, 5, 5, 0, 0, 0,
    4, 4, 4, 3, 3, 3, 3, 3, 4, 5, 4, 5, 0, 0, 0, 0,
    6, 5, 3, 3, 3, 3, 3, 3, 4, 3, 6, 0, 0, 0, 0, 0,
    6, 5, 3, 3, 3, 2, 3, 4, 3, 6, 0, 0, 0, 0, 0, 0,
    6, 4, 5, 3, 2, 2, 3, 3, 6, 0, 0, 0, 0, 0, 0, 0,
    6, 6, 4, 2, 2, 3, 2, 5, 0, 0, 0, 0, 0, 0, 0, 0,
    5, 5, 3, 2, 2, 2, 4, 0, 0, 0, 0, 0, 0, 0, 0, 0,
    4, 4, 3, 3, 1, 3, 0, 0, 0, 0, 0, 0, 0, 0, 0, 0,
    4, 4, 2, 1, 3, 0, 0, 0, 0, 0, 0, 0, 0, 0, 0, 0,
    3, 3, 1, 2, 0, 0, 0, 0, 0, 0, 0, 0, 0, 0, 0, 0,
    2, 2, 1, 0, 0, 0, 0, 0, 0, 0, 0, 0, 0, 0, 0, 0,
    1, 1, 0, 0, 0, 0, 0, 0, 0, 0, 0, 0, 0, 0, 0, 0
  };
  localparam logic [8:0] TZ_BITS [240] = '{
    1, 3, 2, 3, 2, 3, 2, 3, 2, 3, 2, 3, 2, 3, 2, 1,
    7, 6, 5, 4, 3, 5, 4, 3, 2, 3, 2, 3, 2, 1, 0, 0,
    5, 7, 6, 5, 4, 3, 4, 3, 2, 3, 2, 1, 1, 0, 0, 0,
    3, 7, 5, 4, 6, 5, 4, 3, 3, 2, 2, 1, 0, 0, 0, 0,
    5, 4, 3, 7, 6, 5, 4, 3, 2, 1, 1, 0, 0, 0, 0, 0,
    1, 1, 7, 6, 5, 4, 3, 2, 1, 1, 0, 0, 0, 0, 0, 0,
    1, 1, 5, 4, 3, 3, 2, 1, 1, 0, 0, 0, 0, 0, 0, 0,
    1, 1, 1, 3, 3, 2, 2, 1, 0, 0, 0, 0, 0, 0, 0, 0,
    1, 0, 1, 3, 2, 1, 1, 1, 0, 0, 0, 0, 0, 0, 0, 0,
    1, 0, 1, 3, 2, 1, 1, 0, 0, 0, 0, 0, 0, 0, 0, 0,
    0, 1, 1, 2, 1, 3, 0, 0, 0, 0, 0, 0, 0, 0, 0, 0,
    0, 1, 1, 1, 1, 0, 0, 0, 0, 0, 0, 0, 0, 0, 0, 0,
    0, 1, 1, 1, 0, 0, 0, 0, 0, 0, 0, 0, 0, 0, 0, 0,
    0, 1, 1, 0, 0, 0, 0, 0, 0, 0, 0, 0, 0, 0, 0, 0,
    0, 1, 0, 0, 0, 0, 0, 0, 0, 0, 0, 0, 0, 0, 0, 0
  };
  // Total_zeros_DC tables for chroma DC: row = TotalCoeff-1 (4 entries per row).
  localparam logic [3:0] TZDC_LEN [12] = '{
    1, 2, 3, 3, 1, 2, 2, 0, 1, 1, 0, 0
  };
  localparam logic [8:0] TZDC_BITS [12] = '{
    1, 1, 1, 0, 1, 1, 0, 0, 1, 0, 0, 0
  };

  // levelCode -> Level value: even codes are positive, odd codes negative.
  function automatic level_t level_of_code(logic [13:0] level_code);
    logic [14:0] mag;
    mag = level_code[0] ? (15'(level_code) + 15'd1) >> 1 : (15'(level_code) + 15'd2) >> 1;
    return level_code[0] ? -level_t'(mag) : level_t'(mag);
  endfunction

  // Table selection for the next Level: leave Level_VLC0 after the first level,
  // then move up one table when |level| exceeds the Table 3 threshold
  // 3 << (suffix_len - 1) of the table just entered (0, 3, 6, 12, 24, 48).
  function automatic logic [2:0] next_suffix_len(logic [2:0] suffix_len, level_t lvl);
    logic [2:0]  sl;
    logic [15:0] mag;
    sl  = (suffix_len == 3'd0) ? 3'd1 : suffix_len;
    mag = lvl[15] ? 16'(-lvl) : 16'(lvl);
    if (sl < 3'd6 && mag > (16'd3 << (sl - 3'd1))) sl = sl + 3'd1;
    return sl;
  endfunction

endpackage
