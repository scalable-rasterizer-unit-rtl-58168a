// minmax3: 3-tap sorter. Holds the last three coordinate values shifted in and
// outputs their minimum and maximum, registered. A new value can be shifted in
// every clock cycle (shift); min/max of the three taps appear one cycle after
// the shift that completes the window. For a triangle strip one shift per new
// vertex updates the window; for a list three shifts load a fresh triangle.
module minmax3 #(
  parameter int unsigned W = 16
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                shift,
  input  logic signed [W-1:0] din,
  output logic signed [W-1:0] vmin,
  output logic signed [W-1:0] vmax
);
  logic signed [W-1:0] t0, t1, t2;        // t0 newest
  logic signed [W-1:0] n0, n1, n2, lo01, hi01;

  always_comb begin
    n0 = shift ? din : t0;
    n1 = shift ? t0  : t1;
    n2 = shift ? t1  : t2;
    lo01 = (n0 < n1) ? n0 : n1;
    hi01 = (n0 < n1) ? n1 : n0;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      t0 <= '0; t1 <= '0; t2 <= '0;
      vmin <= '0; vmax <= '0;
    end else begin
      t0 <= n0; t1 <= n1; t2 <= n2;
      vmin <= (n2 < lo01) ? n2 : lo01;
      vmax <= (n2 > hi01) ? n2 : hi01;
    end
  end
endmodule
