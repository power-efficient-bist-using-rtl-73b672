// bs_lfsr: bit-swapping LFSR test pattern generator.
//
// An N-bit Fibonacci LFSR shifts towards its most significant bit; the new
// bit 1 (q[0]) is the XOR of the stages selected by TAPS. Its last stage,
// bit N (q[N-1]), is the selection line of a row of 2:1 multiplexers that
// swap neighbouring bits: while bit N is 0, bit 1 trades places with bit 2,
// bit 3 with bit 4 and so on, up to bit N-2 with bit N-1 when N is odd or up
// to bit N-3 with bit N-2 when N is even; while bit N is 1 the word passes
// unchanged. Bit N itself is never swapped, so the mapping is one-to-one and
// the output still runs through all 2^N-1 non-zero words per period, but each
// swapped bit toggles a quarter less often (for N = 8: 96 instead of 128
// transitions per period, 2^(N-2) saved per pair).
//
// The swap rule, the selection line and N = 8 follow the design description.
// The feedback polynomial x^8 + x^6 + x^5 + x^4 + 1, the seed and the
// synchronous load are this design's choices.
//
// Interface: `load` puts SEED into the register, `en` advances it by one
// step; load wins. `pattern` is combinational from the register, so a new
// pattern appears one clock after each enabled edge. Reset (active low,
// asynchronous) also loads SEED.
module bs_lfsr #(
  parameter int unsigned    N     = 8,
  parameter logic [N-1:0]   TAPS  = 8'b1011_1000,  // stages 8,6,5,4 (bit i-1 = stage i)
  parameter logic [N-1:0]   SEED  = 8'h01
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         load,      // synchronous: register <= SEED
  input  logic         en,        // advance one LFSR step
  output logic [N-1:0] state,     // raw LFSR register (conventional LFSR output)
  output logic         swap,      // 1 while the neighbouring bits are swapped
  output logic [N-1:0] pattern    // bit-swapped test pattern
);

  logic [N-1:0] q;
  logic         feedback;

  assign feedback = ^(q & TAPS);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)     q <= SEED;
    else if (load)  q <= SEED;
    else if (en)    q <= {q[N-2:0], feedback};
  end

  // Selection line: swapping happens while the last stage holds 0.
  assign swap = ~q[N-1];

  // Pairs (2k+1, 2k+2) in 1-based numbering, i.e. q[2k] and q[2k+1], for
  // every pair whose upper bit is at most bit N-1 (1-based).
  always_comb begin
    pattern = q;
    for (int unsigned k = 0; 2 * k + 2 <= N - 1; k++) begin
      pattern[2*k]   = swap ? q[2*k+1] : q[2*k];
      pattern[2*k+1] = swap ? q[2*k]   : q[2*k+1];
    end
  end

  assign state = q;

endmodule
