// lgca_collision: collision stage for a group of G lattice sites.
//
// The group arrives plane by plane: cin[d] is the G-bit vector of direction
// C_d (d = 0 rest, 1..6 moving) over the G sites, bit g belonging to site g.
// Every site applies the FHP rule set of lgca_pkg::fhp_collide with its own
// chirality bit xi[g]. Because each output bit depends only on the 7 bits of
// its site and xi, the G sites are evaluated side by side, the bit-sliced
// "one wide word, many lattices" vectorisation. Purely combinational.
// The rule set (head-on pairs with and without a rest particle, symmetric
// triples, 120-degree pairs and their inverse with a rest particle, head-on
// pair plus spectator and its mirror image) follows the collision cases
// drawn for the design; the four-particle case with a rest particle and the
// rest of the 76-case FHP-III table are not reproduced.
module lgca_collision
  import lgca_pkg::*;
#(
  parameter int unsigned G = 48
) (
  input  logic [NDIR-1:0][G-1:0] cin,
  input  logic [G-1:0]           xi,
  output logic [NDIR-1:0][G-1:0] cout
);
  for (genvar g = 0; g < G; g++) begin : g_site
    site_t s, o;
    for (genvar d = 0; d < NDIR; d++) begin : g_bit
      assign s[d]       = cin[d][g];
      assign cout[d][g] = o[d];
    end
    assign o = fhp_collide(s, xi[g]);
  end
endmodule
