// tb_lgca_collision: exhaustive test of the FHP collision stage.
//
// All 128 site states times both chirality values are applied, spread over
// the G = 8 sites of the group in different positions. Each output site is
// compared with a collision rule list written here with direction
// arithmetic, and independently checked for conservation of particle count
// and of momentum (hexagonal unit vectors in half-site units). The test
// also checks that both chirality values give different results for the
// random rules (head-on pairs, pair plus spectator) and that every rule
// class fires.
module tb_lgca_collision;
  import lgca_pkg::*;
  localparam int G = 8;
  int checks = 0, failures = 0, n_changed = 0, n_chiral = 0;
  logic [NDIR-1:0][G-1:0] cin, cout;
  logic [G-1:0] xi;
  lgca_collision #(.G(G)) dut (.cin, .xi, .cout);

  localparam int MX [7] = '{0, -1, 1, 2, 1, -1, -2};
  localparam int MY [7] = '{0, 1, 1, 0, -1, -1, 0};

  function automatic logic [6:0] B(int i);
    return 7'(1) << (((i - 1) % 6 + 6) % 6 + 1);
  endfunction
  function automatic logic [6:0] coll_ref(logic [6:0] s, bit x);
    for (int i = 1; i <= 6; i++) begin
      if (s == (B(i) | B(i+3)))          return x ? (B(i+1) | B(i+4)) : (B(i-1) | B(i+2));
      if (s == (B(i) | B(i+3) | 7'd1))   return x ? (B(i+1) | B(i+4) | 7'd1) : (B(i-1) | B(i+2) | 7'd1);
      if (s == (B(i) | B(i+2) | B(i+4))) return B(i+1) | B(i+3) | B(i+5);
      if (s == (B(i-1) | B(i+1)))        return B(i) | 7'd1;
      if (s == (B(i) | 7'd1))            return B(i-1) | B(i+1);
      if (s == (B(i) | B(i-1) | B(i+2)))  return x ? (B(i) | B(i+1) | B(i-2)) : (B(i-1) | B(i+1) | 7'd1);
      if (s == (B(i) | B(i+1) | B(i-2)))  return x ? (B(i) | B(i-1) | B(i+2)) : (B(i-1) | B(i+1) | 7'd1);
    end
    return s;
  endfunction

  logic [6:0] last_out [128];
  initial begin
    for (int xv = 0; xv < 2; xv++)
      for (int base = 0; base < 128; base += G) begin
        for (int g = 0; g < G; g++) begin
          automatic logic [6:0] s = 7'((base + g * 5) % 128);
          for (int d = 0; d < NDIR; d++) cin[d][g] = s[d];
          xi[g] = 1'(xv);
        end
        #1;
        for (int g = 0; g < G; g++) begin
          automatic logic [6:0] s, o;
          automatic int mx0 = 0, my0 = 0, mx1 = 0, my1 = 0;
          for (int d = 0; d < NDIR; d++) begin s[d] = cin[d][g]; o[d] = cout[d][g]; end
          for (int d = 0; d < NDIR; d++) begin
            mx0 += s[d] * MX[d]; my0 += s[d] * MY[d]; mx1 += o[d] * MX[d]; my1 += o[d] * MY[d];
          end
          checks++;
          if (o != coll_ref(s, 1'(xv)) || $countones(o) != $countones(s) || mx0 != mx1 || my0 != my1) begin
            failures++;
            if (failures < 10) $display("state %b xi %0d: got %b exp %b", s, xv, o, coll_ref(s, 1'(xv)));
          end
          if (o != s) n_changed++;
          if (xv == 0) last_out[s] = o;
          else if (last_out[s] != o) n_chiral++;
        end
      end
    checks++;
    // 6 head-on pairs (3 states x 2 with/without rest) and 12 pair-plus-spectator
    // states depend on xi; each state appears once per xi
    if (n_chiral != 18) begin failures++; $display("%0d chirality-dependent states", n_chiral); end
    checks++;
    // 3 + 3 head-on, 2 triples, 6 + 6 rest/120-degree, 6 + 6 pair-plus-spectator
    // states, each for both xi
    if (n_changed != 2 * (3 + 3 + 2 + 6 + 6 + 12)) begin failures++; $display("%0d changed states", n_changed); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #100000;
    failures++; $display("watchdog timeout");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
