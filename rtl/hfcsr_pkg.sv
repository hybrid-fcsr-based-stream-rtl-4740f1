// hfcsr_pkg: sizes and connection constants shared by the hybrid FCSR
// keystream generator.
//
// Each Galois FCSR is described by its main-register length N and by
// d = (|q| + 1) / 2, where |q| is the connection integer. Bit i of d marks a
// feedback tap into cell i; every tap below the top cell carries an
// adder-with-carry cell. The four connection integers are the ones the
// cipher specifies for its 416-bit state:
//   q1 = 2^96  + 2^58 + 2^35 + 2^2 - 1  ->  d1 = 2^95  + 2^57 + 2^34 + 2
//   q2 = 2^128 + 2^5  + 2^4  + 2^2 - 1  ->  d2 = 2^127 + 2^4  + 2^3  + 2
//   q3 = 2^64  + 2^59 + 2^8  + 2^2 - 1  ->  d3 = 2^63  + 2^58 + 2^7  + 2
//   q4 = 2^128 + 2^21 + 2^19 + 2^2 - 1  ->  d4 = 2^127 + 2^20 + 2^18 + 2
// The key and the IV are 128 bits each and key initialization lasts 192
// clocks, as the cipher specifies.
package hfcsr_pkg;

  localparam int unsigned KEY_W       = 128;
  localparam int unsigned IV_W        = 128;
  localparam int unsigned INIT_CLOCKS = 192;

  localparam int unsigned N1 = 96;
  localparam int unsigned N2 = 128;
  localparam int unsigned N3 = 64;
  localparam int unsigned N4 = 128;

  localparam logic [N1-1:0] D1 = (96'd1  << 95)  | (96'd1  << 57) | (96'd1  << 34) | 96'd2;
  localparam logic [N2-1:0] D2 = (128'd1 << 127) | (128'd1 << 4)  | (128'd1 << 3)  | 128'd2;
  localparam logic [N3-1:0] D3 = (64'd1  << 63)  | (64'd1  << 58) | (64'd1  << 7)  | 64'd2;
  localparam logic [N4-1:0] D4 = (128'd1 << 127) | (128'd1 << 20) | (128'd1 << 18) | 128'd2;

  // Phases of the key/IV setup and keystream production.
  typedef enum logic [1:0] {
    PH_IDLE = 2'd0,   // registers hold, no keystream
    PH_INIT = 2'd1,   // 192 key-initialization clocks, z fed back
    PH_RUN  = 2'd2    // one keystream bit per clock
  } phase_e;

endpackage
