// cvd_part1_fsm: Part-1 of the control vector detector, a reduced Mealy FSM
// that recognises N desired M-bit control vectors in a serial bit stream and
// drives a user defined OW-bit output combination on the last bit of each.
//
// How it works. The state table is not written by hand: it is derived at
// elaboration time from the VECTORS/CODES parameters by the construction
// the design is built on.
//  1. The first M-1 bits of the vectors form a prefix tree; a state is a
//     node of the tree (one column of the tree per received bit).
//  2. Default states: F1 is the state reached from the initial state by a
//     first bit 1, or the initial state if no vector starts with 1; F0 is
//     the same for a first bit 0. Any input for which a state has no
//     defined successor moves the FSM to F0 or F1.
//  3. The states of the last column are merged with the initial state
//     (first reduction rule): the last bit of a desired vector produces that
//     vector's output combination and returns the FSM to the initial state.
//  4. Column by column, from the last column towards the first, states that
//     have the same next states and the same outputs for input 0 and for
//     input 1 are merged (second reduction rule). With a single output this
//     yields exactly the 31-state table of the 21-bit example.
// The resulting table is a constant ROM indexed by {state, x}; the state
// register is the only storage. NUM_STATES reports the reduced state count.
//
// The FSM does not detect overlapping vectors: it assumes vectors sit in
// consecutive M-bit frames, and expects rst to be pulsed on the last bit
// of every frame (Part-2 does this).
//
// Interface and timing: one bit x per rising clk edge. z is combinational
// (Mealy) and is valid in the cycle in which the last bit of a vector is
// on x. rst is synchronous and active high: it forces the next state to the
// initial state, while z of the current cycle still reflects state and x.
// Unused state encodings go to the initial state.
//
// The construction follows the published method; the packing of the
// parameters, the ROM form of the table and the synchronous reset are this
// design's own choices. Vectors are not sorted first: ordering changes only
// the numbering of the states, not the table.
module cvd_part1_fsm #(
  parameter int unsigned M  = cvd_pkg::EX1_M,   // vector length in bits
  parameter int unsigned N  = cvd_pkg::EX1_N,   // number of desired vectors
  parameter int unsigned OW = 1,                // output combination width
  parameter logic [N*M-1:0]  VECTORS = cvd_pkg::EX1_VECTORS,
  parameter logic [N*OW-1:0] CODES   = cvd_pkg::EX1_CODES
) (
  input  logic          clk,
  input  logic          rst,   // synchronous: go to the initial state
  input  logic          x,     // serial bit stream, first bit = vector MSB
  output logic [OW-1:0] z      // output combination (Mealy)
);

  // Largest possible number of unreduced states: the initial state plus
  // one per vector and column 1..M-1.
  localparam int unsigned MAXS = N * (M - 1) + 1;
  localparam int unsigned NW   = 16;            // state id width in the ROM image
  localparam int unsigned EW   = NW + OW;       // one ROM entry: {next, out}
  localparam int unsigned RAWW = 32 + MAXS * 2 * EW;

  // Builds the reduced state table. Bits [31:0] hold the state count; entry
  // (s, x) sits at 32 + (2*s + x)*EW and holds {next state, output}.
  function automatic logic [RAWW-1:0] build_fsm();
    int            ch0 [MAXS];
    int            ch1 [MAXS];
    int            dep [MAXS];
    int            nx0 [MAXS];
    int            nx1 [MAXS];
    logic [OW-1:0] o0  [MAXS];
    logic [OW-1:0] o1  [MAXS];
    bit            t0  [MAXS];
    bit            t1  [MAXS];
    int            rep [MAXS];
    int            id  [MAXS];
    logic [RAWW-1:0] raw;
    int nn, cur, f0, f1, ns;
    bit found;
    logic [NW-1:0] nxt;

    for (int s = 0; s < int'(MAXS); s++) begin
      ch0[s] = -1; ch1[s] = -1; dep[s] = 0;
      o0[s] = '0;  o1[s] = '0;  t0[s] = 1'b0; t1[s] = 1'b0;
      rep[s] = s;  id[s] = 0;   nx0[s] = 0;   nx1[s] = 0;
    end
    nn = 1;

    // Prefix tree of the first M-1 bits; the last bit defines the output.
    for (int k = 0; k < int'(N); k++) begin
      cur = 0;
      for (int i = 0; i < int'(M) - 1; i++) begin
        if (VECTORS[k*M + M - 1 - i]) begin
          if (ch1[cur] < 0) begin ch1[cur] = nn; dep[nn] = i + 1; nn++; end
          cur = ch1[cur];
        end else begin
          if (ch0[cur] < 0) begin ch0[cur] = nn; dep[nn] = i + 1; nn++; end
          cur = ch0[cur];
        end
      end
      if (VECTORS[k*M]) begin t1[cur] = 1'b1; o1[cur] |= CODES[k*OW +: OW]; end
      else              begin t0[cur] = 1'b1; o0[cur] |= CODES[k*OW +: OW]; end
    end

    // Default states F0 and F1.
    f0 = (ch0[0] >= 0) ? ch0[0] : 0;
    f1 = (ch1[0] >= 0) ? ch1[0] : 0;

    // Next states: tree edge, else completed vector (initial state), else default.
    for (int s = 0; s < nn; s++) begin
      nx0[s] = (ch0[s] >= 0) ? ch0[s] : (t0[s] ? 0 : f0);
      nx1[s] = (ch1[s] >= 0) ? ch1[s] : (t1[s] ? 0 : f1);
    end

    // Column-wise merging of equivalent states, last column first.
    for (int d = int'(M) - 1; d >= 1; d--) begin
      for (int s = 0; s < nn; s++) begin
        if (dep[s] == d) begin
          found = 1'b0;
          for (int r = 0; r < s; r++) begin
            if (!found && dep[r] == d && rep[r] == r &&
                rep[nx0[r]] == rep[nx0[s]] && rep[nx1[r]] == rep[nx1[s]] &&
                o0[r] == o0[s] && o1[r] == o1[s]) begin
              rep[s] = r;
              found  = 1'b1;
            end
          end
        end
      end
    end

    // Compact numbering of the surviving states; the initial state is 0.
    ns = 0;
    for (int s = 0; s < nn; s++) begin
      if (rep[s] == s) begin id[s] = ns; ns++; end
    end

    raw = '0;
    raw[31:0] = ns;
    for (int s = 0; s < nn; s++) begin
      if (rep[s] == s) begin
        nxt = NW'(id[rep[nx0[s]]]);
        raw[32 + (2*id[s])*EW +: EW]     = {nxt, o0[s]};
        nxt = NW'(id[rep[nx1[s]]]);
        raw[32 + (2*id[s] + 1)*EW +: EW] = {nxt, o1[s]};
      end
    end
    return raw;
  endfunction

  localparam logic [RAWW-1:0] RAW = build_fsm();

  // Number of states of the reduced FSM.
  localparam int unsigned NUM_STATES = RAW[31:0];
  localparam int unsigned SW = (NUM_STATES > 1) ? $clog2(NUM_STATES) : 1;

  typedef logic [SW-1:0] state_t;
  localparam state_t S_INIT = '0;

  state_t        state_q, state_d;
  logic [EW-1:0] entry;

  always_comb begin
    entry = '0;
    if (int'(state_q) < int'(NUM_STATES))
      entry = RAW[32 + (2*int'(state_q) + int'(x))*EW +: EW];
    state_d = state_t'(entry[EW-1:OW]);
    z       = entry[OW-1:0];
  end

  always_ff @(posedge clk) begin
    if (rst) state_q <= S_INIT;
    else     state_q <= state_d;
  end

  initial begin
    assert (M >= 2) else $error("cvd_part1_fsm: M must be at least 2");
    assert (NUM_STATES <= (1 << NW)) else $error("cvd_part1_fsm: too many states");
  end

endmodule
