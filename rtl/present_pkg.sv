// present_pkg: constants and pure functions shared by the PRESENT core with
// reconfigurable S-boxes.
//
// The PRESENT S-box, its bit permutation P and the inverse permutation are
// the cipher's public definitions (PRESENT, CHES 2007); the countermeasure
// design uses them without restating them, so they are taken from the cipher
// standard. The operating-mode struct collects the three countermeasure
// switches (S-box decomposition, Boolean masking, register precharge) whose
// eight combinations the design is evaluated in.
package present_pkg;

  localparam int unsigned NSBOX     = 16;  // S-boxes in the round-based S-layer
  localparam int unsigned STATE_W   = 64;  // cipher block width
  localparam int unsigned KEY_W     = 80;  // PRESENT-80 key register
  localparam int unsigned NROUNDS   = 31;  // rounds with an S-layer
  localparam int unsigned TBL_DEPTH = 16;  // entries of a 4x4 function table

  typedef logic [3:0]         nibble_t;
  typedef logic [STATE_W-1:0] state_t;
  typedef logic [KEY_W-1:0]   key_t;

  // Countermeasure switches; all eight combinations are legal.
  typedef struct packed {
    logic decomp;     // S-box decomposition into random R1 and R2 = S o R1^-1
    logic mask;       // Boolean masking with m1 (state) and m2 (mid register)
    logic precharge;  // load each register with random data before real data
  } mode_t;

  // PRESENT S-box: C 5 6 B 9 0 A D 3 E F 8 4 7 1 2
  function automatic nibble_t sbox(input nibble_t x);
    case (x)
      4'h0: sbox = 4'hC;  4'h1: sbox = 4'h5;  4'h2: sbox = 4'h6;  4'h3: sbox = 4'hB;
      4'h4: sbox = 4'h9;  4'h5: sbox = 4'h0;  4'h6: sbox = 4'hA;  4'h7: sbox = 4'hD;
      4'h8: sbox = 4'h3;  4'h9: sbox = 4'hE;  4'hA: sbox = 4'hF;  4'hB: sbox = 4'h8;
      4'hC: sbox = 4'h4;  4'hD: sbox = 4'h7;  4'hE: sbox = 4'h1;  default: sbox = 4'h2;
    endcase
  endfunction

  // Bit permutation: state bit i moves to position 16*i mod 63 (bit 63 stays).
  function automatic state_t perm(input state_t s);
    state_t r;
    for (int i = 0; i < 63; i++) r[(16 * i) % 63] = s[i];
    r[63] = s[63];
    return r;
  endfunction

  // Inverse bit permutation: position j takes bit 16*i mod 63 back to i.
  function automatic state_t perm_inv(input state_t s);
    state_t r;
    for (int i = 0; i < 63; i++) r[i] = s[(16 * i) % 63];
    r[63] = s[63];
    return r;
  endfunction

endpackage
