// lgca_pkg: FHP lattice-gas definitions shared by the LGCA modules.
//
// A lattice site holds 7 occupation bits: C0 is the rest particle, C1..C6 the
// six moving directions (C1 up-left, C2 up-right, C3 right, C4 down-right,
// C5 down-left, C6 left; "up" is +y). A site is one 7-bit value with bit i
// holding C_i (bit 0 the rest particle). Inside the PEs a group of G sites is kept plane
// by plane (vector of all C0 bits, vector of all C1 bits, ...), so one
// bitwise operation acts on G sites at once.
//
// The hexagonal grid is mapped onto a square (x, y) index: odd and even rows
// are shifted by half a site, so the neighbour offsets depend on the row
// parity (see nb_dx / nb_dy).
package lgca_pkg;

  localparam int unsigned NDIR = 7;

  typedef logic [NDIR-1:0] site_t;   // bit i = C_i (bit 0 = rest)

  // Opposite moving direction: C1<->C4, C2<->C5, C3<->C6.
  function automatic int unsigned opp(input int unsigned i);
    return (i + 2) % 6 + 1;
  endfunction

  // Neighbour reached from (x, y) along C_i (i = 1..6).
  function automatic int nb_dx(input int unsigned i, input logic odd_row);
    case (i)
      1: return odd_row ?  0 : -1;
      2: return odd_row ?  1 :  0;
      3: return 1;
      4: return odd_row ?  1 :  0;
      5: return odd_row ?  0 : -1;
      default: return -1;
    endcase
  endfunction
  function automatic int nb_dy(input int unsigned i);
    case (i)
      1, 2:    return  1;
      4, 5:    return -1;
      default: return  0;
    endcase
  endfunction

  // Rotate the six moving bits by k steps (C_i -> C_(i+k)); rest bit kept.
  function automatic site_t rot(input site_t s, input int unsigned k);
    logic [5:0] m;
    m = s[6:1];
    m = (m << (k % 6)) | (m >> (6 - k % 6));
    return {m, s[0]};
  endfunction

  // FHP collision of one site. xi picks between the two outcomes of the
  // random rules. Rules (rotations of each pattern included):
  //   head-on pair, no rest       {i, i+3}       -> {i+1, i+4} (xi) or {i-1, i+2}
  //   head-on pair with rest      {0, i, i+3}    -> {0, i+1, i+4} (xi) or {0, i-1, i+2}
  //   symmetric triple            {i, i+2, i+4}  -> {i+1, i+3, i+5}
  //   pair at 120 deg, no rest    {i-1, i+1}     -> {0, i}
  //   rest plus one               {0, i}         -> {i-1, i+1}
  //   head-on pair plus spectator {i, i-1, i+2}  -> {i, i+1, i-2} (xi) or {0, i-1, i+1}
  //   and its mirror image        {i, i+1, i-2}  -> {i, i-1, i+2} (xi) or {0, i-1, i+1}
  // Every other state passes unchanged. All rules keep mass (rest counts 1)
  // and momentum.
  function automatic site_t fhp_collide(input site_t s, input logic xi);
    site_t o;
    o = s;
    for (int unsigned k = 0; k < 6; k++) begin
      if      (s == rot(7'b0010010, k)) o = xi ? rot(7'b0100100, k) : rot(7'b1001000, k);
      else if (s == rot(7'b0010011, k)) o = xi ? rot(7'b0100101, k) : rot(7'b1001001, k);
      else if (s == rot(7'b0101010, k)) o = rot(7'b1010100, k);
      else if (s == rot(7'b0001010, k)) o = rot(7'b0000101, k);
      else if (s == rot(7'b0000101, k)) o = rot(7'b0001010, k);
      else if (s == rot(7'b1001010, k)) o = xi ? rot(7'b0100110, k) : rot(7'b1000101, k);
      else if (s == rot(7'b0100110, k)) o = xi ? rot(7'b1001010, k) : rot(7'b1000101, k);
    end
    return o;
  endfunction

  // Chirality bit for the random rules: a fixed pseudo-random hash of the
  // site position and the time step, so every PE of the chain can form it
  // locally and results are reproducible.
  function automatic logic fhp_xi(input logic [15:0] x, input logic [15:0] y,
                                  input logic [15:0] step);
    logic [31:0] h;
    h = {x, y} ^ {step, step ^ 16'h5a3c};
    h = h ^ (h << 13);
    h = h ^ (h >> 17);
    h = h ^ (h << 5);
    return h[7] ^ h[19];
  endfunction

endpackage
