// tlc_pkg: types and constants shared by the traffic light controller.
//
// The controller drives two three-lamp signal heads, one for the north-south
// highway and one for the east-west highway. Each head is a packed RYG triple
// (red in the top bit, green in the bottom bit), and the two heads together
// form the 6-bit signal vector {NS, EW}. The six stages and their vectors
// follow the stage table of the design: 001100, 010100, 100100, 100001,
// 100010, 100100. The state names S0..S5 follow its state diagram.
//
// Choices of this implementation: the 3-bit binary state encoding and the
// reset state S0.
package tlc_pkg;

  // One signal head: exactly one lamp lit.
  typedef struct packed {
    logic red;
    logic yellow;
    logic green;
  } ryg_t;

  localparam ryg_t RYG_RED    = '{red: 1'b1, yellow: 1'b0, green: 1'b0};
  localparam ryg_t RYG_YELLOW = '{red: 1'b0, yellow: 1'b1, green: 1'b0};
  localparam ryg_t RYG_GREEN  = '{red: 1'b0, yellow: 1'b0, green: 1'b1};

  // Both heads; ns occupies bits [5:3], ew bits [2:0].
  typedef struct packed {
    ryg_t ns;
    ryg_t ew;
  } lights_t;

  // S0: NS green (long)   S1: NS yellow (short)   S2: all red (short)
  // S3: EW green (long)   S4: EW yellow (short)   S5: all red (short)
  typedef enum logic [2:0] {
    S0 = 3'd0,
    S1 = 3'd1,
    S2 = 3'd2,
    S3 = 3'd3,
    S4 = 3'd4,
    S5 = 3'd5
  } state_t;

  // Dwell counts from the state diagram: a green stage stays while
  // Count < 15, every other stage while Count < 3.
  localparam int unsigned LONG_DELAY_DEFAULT  = 15;
  localparam int unsigned SHORT_DELAY_DEFAULT = 3;

  function automatic state_t next_state(state_t s);
    case (s)
      S0:      return S1;
      S1:      return S2;
      S2:      return S3;
      S3:      return S4;
      S4:      return S5;
      default: return S0;
    endcase
  endfunction

  function automatic lights_t lights_of(state_t s);
    case (s)
      S0:      return '{ns: RYG_GREEN,  ew: RYG_RED};     // 001 100
      S1:      return '{ns: RYG_YELLOW, ew: RYG_RED};     // 010 100
      S2:      return '{ns: RYG_RED,    ew: RYG_RED};     // 100 100
      S3:      return '{ns: RYG_RED,    ew: RYG_GREEN};   // 100 001
      S4:      return '{ns: RYG_RED,    ew: RYG_YELLOW};  // 100 010
      default: return '{ns: RYG_RED,    ew: RYG_RED};     // 100 100
    endcase
  endfunction

  function automatic logic is_long(state_t s);
    return (s == S0) || (s == S3);
  endfunction

endpackage
