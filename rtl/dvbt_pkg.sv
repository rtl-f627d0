// dvbt_pkg: constants shared by the DVB-T synchronisation back end.
//
// Holds the 2k-mode OFDM sizes, the carrier-to-FFT-position mapping, the
// 45 continual pilot carrier indices of 2k mode, the 12-pilot subset used for
// integer CFO estimation, and the CORDIC arctangent table.
//
// Angles everywhere in this design are 16-bit two's complement numbers in
// which 2^16 is one full turn (2*pi), so they wrap naturally.
//
// The FFT output is assumed to arrive in "centred" order: stream position
// p = 0..N-1 holds frequency bin p - N/2, so active carrier k (0..1704) sits at
// p = k + K_OFFSET with K_OFFSET = N/2 - 852 = 172. This ordering is a choice of
// this design; it keeps every pilot window inside one symbol and in order.
package dvbt_pkg;

  localparam int N_FFT    = 2048;   // 2k mode FFT length
  localparam int N_GUARD  = 512;    // guard interval 1/4 (choice of this design)
  localparam int K_MAX    = 1704;   // last active carrier of 2k mode
  localparam int K_CENTER = 852;    // centre carrier
  localparam int K_OFFSET = 172;    // stream position of carrier 0

  localparam int ANG_W = 16;        // angle width, 2^16 = one turn

  // continual pilot carrier indices, 2k mode (45 pilots)
  localparam int N_CPIL = 45;
  localparam int CPIL_POS [N_CPIL] = '{
      0,   48,   54,   87,  141,  156,  192,  201,  255,  279,
    282,  333,  432,  450,  483,  525,  531,  618,  636,  714,
    759,  765,  780,  804,  873,  888,  918,  939,  942,  969,
    984, 1050, 1101, 1107, 1110, 1137, 1140, 1146, 1206, 1269,
   1323, 1377, 1491, 1683, 1704};

  // pilots used by the memory-less integer CFO search (spacing > 100 carriers)
  localparam int N_IPIL = 12;
  localparam int IPIL_POS [N_IPIL] = '{
     54, 156, 279, 432, 618, 759, 873, 984, 1101, 1206, 1323, 1491};

  // atan(2^-i) in angle units (2^16 = 2*pi)
  localparam int CORDIC_MAX_ITER = 16;
  localparam int ATAN_TAB [CORDIC_MAX_ITER] = '{
    8192, 4836, 2555, 1297, 651, 326, 163, 81, 41, 20, 10, 5, 3, 1, 1, 0};

  typedef enum logic [2:0] {
    JE_IDLE    = 3'd0,   // waiting for the first symbol start
    JE_SIGN_WR = 3'd1,   // state 1: store sign bits of one symbol
    JE_ICFO    = 3'd2,   // state 2: store signs and correlate, vote
    JE_PIL_WR  = 3'd3,   // state 3: store continual pilots of one symbol
    JE_TRACK   = 3'd4    // state 4: correlate pilots, estimate RCFO and SCO
  } je_state_e;

endpackage
