// hn_cas: compare-and-swap unit, the two-element sorter of the sorting
// network. Elements are EW bits wide and compared on their KW most
// significant bits (the key); lo receives the element with the smaller key
// and hi the other one. Ties keep the input order. Purely combinational.
module hn_cas #(
  parameter int unsigned EW = 8,
  parameter int unsigned KW = 4
) (
  input  logic [EW-1:0] a,
  input  logic [EW-1:0] b,
  output logic [EW-1:0] lo,
  output logic [EW-1:0] hi
);
  logic swap;
  assign swap = b[EW-1 -: KW] < a[EW-1 -: KW];
  assign lo   = swap ? b : a;
  assign hi   = swap ? a : b;
endmodule
