// shuffle_net - perfect shuffle interconnection of rank g between the
// processor blocks of one array (the links of the single-stage indirect
// hypercube).
//
// Group identifiers: output port o of processor block q has the output group
// identifier {q, o}; input (write) port w of block r has the input group
// identifier {w, r}.  A link joins equal identifiers, so
//   {w, r} = {q, o}   i.e.  r = (q*G + o) mod P,  w = (q*G + o) div P.
// Seen from the data, the group identifier is rotated left by g bits from one
// stage to the next.  Every block sends to min(P, G) blocks and receives from
// min(P, G) blocks; in each clock every write port receives exactly one word.
//
// Purely combinational wiring: the PE output registers drive the memory write
// ports of the receiving blocks directly.
module shuffle_net
  import hc_pkg::*;
#(
  parameter int P = 4,
  parameter int G = 2
) (
  input  cplx_t [P-1:0][G-1:0] din,    // [sending block q][output port o]
  output cplx_t [P-1:0][G-1:0] dout    // [receiving block r][write port w]
);
  for (genvar q = 0; q < P; q++) begin : g_q
    for (genvar o = 0; o < G; o++) begin : g_o
      localparam int V = q * G + o;
      assign dout[V % P][V / P] = din[q][o];
    end
  end
endmodule
