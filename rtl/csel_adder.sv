// csel_adder: carry-select adder with arithmetic-progression group lengths.
//
// The WIDTH bits are cut into groups whose lengths grow by two from the LSB
// upward: 1, 3, 5, 7, ... (FIRST = 1) or 2, 4, 6, 8, ... (FIRST = 2). Inside a
// group, csca_cell bits ripple two conditional carry chains (carry-in 0 and
// carry-in 1) in parallel. The carry out of a group selects between its two
// conditional carry-outs, so the select signal passes through one multiplexer
// per group while the longer groups above are still rippling: that balance is
// what makes these progressions delay-optimal. With the progressions this
// gives 9, 12, 16, 20, 25, 30 or 36 bits exactly; for any other width the
// most significant group is cut short. FIRST defaults to the progression that
// needs the least pruning (this design's choice; the two progressions and
// the pruning of the top group are those of the reference architecture).
//
// cin is the adder's carry-in (used by the CORDIC stage for the +1 of a
// two's-complement subtraction). Purely combinational; cout is the carry out.
module csel_adder
  import cordic_pkg::*;
#(
  parameter int WIDTH = 16,
  parameter int FIRST = csel_best_first(WIDTH)
) (
  input  logic [WIDTH-1:0] a,
  input  logic [WIDTH-1:0] b,
  input  logic             cin,
  output logic [WIDTH-1:0] sum,
  output logic             cout
);
  localparam int NG = csel_num_groups(FIRST, WIDTH);

  initial begin
    assert (FIRST == 1 || FIRST == 2) else $error("csel_adder: FIRST must be 1 or 2");
  end

  // gc[g] = carry into group g
  logic [NG:0] gc;
  assign gc[0] = cin;

  for (genvar g = 0; g < NG; g++) begin : g_grp
    localparam int LSB = csel_group_lsb(FIRST, g);
    localparam int LEN = (LSB + csel_group_len(FIRST, g) > WIDTH) ? WIDTH - LSB
                                                                   : csel_group_len(FIRST, g);
    logic [LEN:0] c0, c1;
    assign c0[0] = 1'b0;
    assign c1[0] = 1'b1;
    for (genvar k = 0; k < LEN; k++) begin : g_bit
      csca_cell #(.FIRST(k == 0)) u_cell (
        .a  (a[LSB+k]),
        .b  (b[LSB+k]),
        .ci0(c0[k]),
        .ci1(c1[k]),
        .cs (gc[g]),
        .co0(c0[k+1]),
        .co1(c1[k+1]),
        .s  (sum[LSB+k])
      );
    end
    assign gc[g+1] = gc[g] ? c1[LEN] : c0[LEN];
  end

  assign cout = gc[NG];
endmodule
