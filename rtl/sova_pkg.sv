// sova_pkg: widths, types and trellis functions shared by the SOVA decoder.
//
// The code is the 8-state, rate-1/3, constraint-length-4 feed-forward code
// with generators G0 = 1+D^2+D^3, G1 = 1+D+D^3, G2 = 1+D+D^2+D^3.
// A state holds the last three input bits, newest in the LSB:
//   state at time n = {u[n-2], u[n-1], u[n]}
// so the decoded bit of a traced state is its LSB, and the two
// predecessors of state s are {b, s[2:1]} for b = 0, 1.
// Soft symbols are 3-bit two's complement, positive meaning "bit 1";
// branch metrics are 5 bits, state metrics 8 bits modulo 2^8, path metric
// differences and soft outputs 6 bits, with all ones meaning "infinity".
// The widths are those of the specification; the state numbering is this
// design's choice.
package sova_pkg;
  localparam int NSTATE = 8;
  localparam int SW     = 3;   // state / pointer width
  localparam int YW     = 3;   // soft symbol width
  localparam int NSYM   = 3;   // symbols per trellis step (rate 1/3)
  localparam int BMW    = 5;   // branch metric width
  localparam int PMW    = 8;   // modulo state metric width
  localparam int DW     = 6;   // path metric difference / soft output width

  typedef logic [SW-1:0]         state_t;
  typedef logic signed [YW-1:0]  sym_t;
  typedef logic signed [BMW-1:0] bm_t;
  typedef logic [PMW-1:0]        pm_t;
  typedef logic [DW-1:0]         delta_t;

  localparam delta_t DELTA_INF = '1;

  // Data carried by the eval token from one traceback cell to the next.
  typedef struct packed {
    state_t s;    // survivor (maximum likelihood) path state
    state_t sc;   // competing path state
    delta_t rel;  // reliability accumulated so far
  } trace_t;

  // Encoder output bits {g2, g1, g0} for input u leaving state `from`
  // (from = {u[n-3], u[n-2], u[n-1]}).
  function automatic logic [NSYM-1:0] enc_out(input state_t from, input logic u);
    logic g0, g1, g2;
    g0 = u ^ from[1] ^ from[2];            // 1 + D^2 + D^3
    g1 = u ^ from[0] ^ from[2];            // 1 + D   + D^3
    g2 = u ^ from[0] ^ from[1] ^ from[2];  // 1 + D + D^2 + D^3
    return {g2, g1, g0};
  endfunction

  function automatic state_t next_state(input state_t from, input logic u);
    return {from[SW-2:0], u};
  endfunction

  function automatic state_t pred_state(input state_t s, input logic b);
    return {b, s[SW-1:1]};
  endfunction
endpackage
