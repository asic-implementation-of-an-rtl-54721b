// Unsigned N x N reversible array multiplier: p = a * b.
//
// Partial products: N*N reversible ANDs, each a Peres gate with its third input tied to
// 0 (output r = a_j & b_i). The a_j line is passed from gate to gate through the Peres
// gate's first output, and each b_i is fanned out by a chain of Feynman gates with a 0
// target, since a reversible gate output may not fan out.
// Summation: a carry-save array. Row 1 adds partial-product rows 0 and 1 with N-1 RH
// (half adder) cells; rows 2..N-1 each add one more partial-product row with N-1 RF
// (full adder) cells; a final ripple row of 1 RH and N-2 RF cells adds the remaining sum
// and carry vectors. In total N half adders and N*N-2N full adders, the count the
// document gives for an n x n reversible multiplier. Needs N >= 2. Combinational.
module rev_mult #(
  parameter int unsigned N = 8
) (
  input  logic [N-1:0]   a,
  input  logic [N-1:0]   b,
  output logic [2*N-1:0] p
);
  // ---------------- partial product generator ----------------
  logic [N-1:0] pp    [N];       // pp[i][j] = b[i] & a[j], weight i+j
  logic [N-1:0] aline [N+1];     // a lines passed down through the Peres gates
  logic [N:0]   bline [N];       // b_i lines passed along the Feynman fan-out chain

  assign aline[0] = a;
  for (genvar i = 0; i < N; i++) begin : g_ppr
    assign bline[i][0] = b[i];
    for (genvar j = 0; j < N; j++) begin : g_ppc
      logic bcopy;
      feynman_gate u_fan (.a(bline[i][j]), .b(1'b0), .p(bline[i][j+1]), .q(bcopy));
      peres_gate   u_and (.a(aline[i][j]), .b(bcopy), .c(1'b0),
                          .p(aline[i+1][j]), .q(), .r(pp[i][j]));
    end
  end

  // ---------------- carry-save array ----------------
  // s[i][j]: sum out of row i, column j (weight i+j); c[i][j]: carry (weight i+j+1).
  logic [N-2:0] s [N];
  logic [N-2:0] c [N];

  for (genvar j = 0; j < N-1; j++) begin : g_row1
    rh_as u_ha (.x(pp[0][j+1]), .y(pp[1][j]), .en(1'b1),
                .sd(s[1][j]), .bout(), .cout(c[1][j]));
  end

  for (genvar i = 2; i < N; i++) begin : g_rows
    for (genvar j = 0; j < N-1; j++) begin : g_col
      logic x_in;
      if (j < N-2) begin : g_mid
        assign x_in = s[i-1][j+1];
      end else begin : g_top
        assign x_in = pp[i-1][N-1];
      end
      rf_as u_fa (.x(x_in), .y(pp[i][j]), .cin(c[i-1][j]), .en(1'b1),
                  .sd(s[i][j]), .cout(c[i][j]), .bout());
    end
  end

  // ---------------- final ripple row ----------------
  logic [N-1:0] rc;   // ripple carries, rc[k] into position k
  assign rc[0] = 1'b0;
  for (genvar k = 0; k < N-1; k++) begin : g_final
    logic x_in;
    if (k < N-2) begin : g_mid
      assign x_in = s[N-1][k+1];
    end else begin : g_top
      assign x_in = pp[N-1][N-1];
    end
    if (k == 0) begin : g_ha
      rh_as u_ha (.x(x_in), .y(c[N-1][k]), .en(1'b1),
                  .sd(p[N+k]), .bout(), .cout(rc[k+1]));
    end else begin : g_fa
      rf_as u_fa (.x(x_in), .y(c[N-1][k]), .cin(rc[k]), .en(1'b1),
                  .sd(p[N+k]), .cout(rc[k+1]), .bout());
    end
  end

  // ---------------- product bits ----------------
  assign p[0] = pp[0][0];
  for (genvar i = 1; i < N; i++) begin : g_low
    assign p[i] = s[i][0];
  end
  assign p[2*N-1] = rc[N-1];
endmodule
