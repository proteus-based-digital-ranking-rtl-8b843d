// rank_pkg: constants and types shared by the ranking system.
// The system ranks four lanes, so a lane number needs three bits
// (0 = empty, 1..4 = lane) and the rank register holds four of them.
// The seven-segment pattern type orders the segments a..g from bit 0.
package rank_pkg;
  localparam int unsigned NUM_LANES = 4;  // trigger switches / register groups
  localparam int unsigned LANE_CODE_W = 3;  // bits per stored lane number
  typedef logic [LANE_CODE_W-1:0] code_t;
  typedef logic [6:0]        seg_t;      // {g,f,e,d,c,b,a}, active high
endpackage
