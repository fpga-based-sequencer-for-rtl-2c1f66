// vme_ga_am_decode: geographical addressing and address-modifier decoding.
//
// A VME64x backplane tells each card its slot number on the active-low
// geographical address pins GA4*..GA0*, with GAP* as parity, so the card needs
// no address jumpers. This block turns those pins into a slot number, checks
// the parity, checks that the address modifier names A16 space, and compares
// the A16 address with the board's window.
//
// Purely combinational. Interface:
//   ga_n, gap_n  geographical address and parity pins (a grounded pin is 0).
//   am           address modifier AM5..AM0.
//   addr         address lines A15..A01.
//   slot         slot number, ~ga_n.
//   ga_ok        GA pins valid: parity odd over GA4*..GA0*, GAP* and slot not 0.
//   am_ok        am is 0x29 (A16 non-privileged) or 0x2D (A16 supervisory).
//   hit          ga_ok, am_ok and A15..A11 equal to the slot number.
// The card only says it uses geographical addressing and AM decoding in A16
// space; the parity rule and AM codes are those of the VME64x standard, and
// the board window (slot number in A15..A11, 2 KiB per slot) is this design's
// own choice.
module vme_ga_am_decode
  import aic_pkg::*;
(
  input  logic [GA_W-1:0]   ga_n,
  input  logic              gap_n,
  input  logic [5:0]        am,
  input  logic [VME_AW-1:1] addr,
  output logic [GA_W-1:0]   slot,
  output logic              ga_ok,
  output logic              am_ok,
  output logic              hit
);
  assign slot  = ~ga_n;
  assign ga_ok = (^{ga_n, gap_n}) && (slot != '0);
  assign am_ok = (am == AM_A16_USER) || (am == AM_A16_SUP);
  assign hit   = ga_ok && am_ok && (addr[VME_AW-1 -: GA_W] == slot);
endmodule
