// cordic_core: parameterised integer CORDIC macro (circle, rotate/vectoring).
//
// The N iterations run on K physical stages connected in a ring, each stage
// preceded by a register (one iteration per clock cycle). K = 1 is the fully
// iterative macro: a single stage is reused N times and its result is fed
// back through the init multiplexers. K > 1 is a partially unrolled macro
// (K must divide N): an operation goes round the ring N/K times, and up to K
// operations are in flight at once, so a new operation can start every N/K
// cycles. K = N is the fully unrolled pipeline, which has no programmable
// shifters and accepts an operation every cycle.
//
// Each ring register carries the data (x, y, z) and, alongside, a valid bit,
// the mode and the round number of its operation; the round addresses the
// stage's step-angle ROM and shifter. The ring of registers, init
// multiplexers and feedback follows the reference architecture; these
// control bits and the ready/done handshake are this design's own way of
// sequencing it.
//
// Interface: an operation is started by holding init high in a cycle where
// ready is high; x0, y0, z0 and mode are sampled at that clock edge. The raw
// pseudo-rotation results x_m, y_m, z_m are valid while done is high, exactly
// N-1 cycles after the edge that sampled init (N cycles per operation for
// K = 1, counting the init cycle). x_m and y_m are NOT multiplied by the scale
// constant K_n (about 0.607 for N >= 10); see k_correction. Inputs must leave
// headroom: |x|, |y| grow by up to 1.65*sqrt(2) before the correction.
// rst_n is an asynchronous active-low reset that empties the ring.
module cordic_core
  import cordic_pkg::*;
#(
  parameter int W    = 16,
  parameter int ZW   = W,
  parameter int FRAC = ZW - 3,
  parameter int N    = 10,
  parameter int K    = 1,
  parameter int RW   = (N / K > 1) ? $clog2(N / K) : 1
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 init,
  input  cordic_mode_e         mode,     // rot/vect
  input  logic signed [W-1:0]  x0,
  input  logic signed [W-1:0]  y0,
  input  logic signed [ZW-1:0] z0,
  output logic                 ready,
  output logic                 done,
  output logic signed [W-1:0]  x_m,
  output logic signed [W-1:0]  y_m,
  output logic signed [ZW-1:0] z_m
);
  localparam int ROUNDS = N / K;
  localparam logic [RW-1:0] LAST = RW'(ROUNDS - 1);

  initial begin
    assert (K >= 1 && N % K == 0) else $error("cordic_core: K must divide N");
  end

  // ring registers: r_*[j] is the input of stage j
  logic signed [W-1:0]  r_x [K];
  logic signed [W-1:0]  r_y [K];
  logic signed [ZW-1:0] r_z [K];
  logic                 r_v [K];
  logic [RW-1:0]        r_rnd [K];
  cordic_mode_e         r_md [K];

  // stage outputs
  logic signed [W-1:0]  s_x [K];
  logic signed [W-1:0]  s_y [K];
  logic signed [ZW-1:0] s_z [K];
  logic signed [ZW-1:0] s_e [K];

  for (genvar j = 0; j < K; j++) begin : g_stage
    step_angle_rom #(.ZW(ZW), .FRAC(FRAC), .N(N), .K(K), .STAGE(j), .RW(RW)) u_rom (
      .round(r_rnd[j]), .e(s_e[j])
    );
    cordic_stage #(.W(W), .ZW(ZW), .N(N), .K(K), .STAGE(j), .RW(RW)) u_stage (
      .mode (r_md[j]),
      .round(r_rnd[j]),
      .x    (r_x[j]),
      .y    (r_y[j]),
      .z    (r_z[j]),
      .e    (s_e[j]),
      .x_nxt(s_x[j]),
      .y_nxt(s_y[j]),
      .z_nxt(s_z[j])
    );
  end

  logic last_busy;   // the last stage holds an operation that goes round again
  assign last_busy = r_v[K-1] && (r_rnd[K-1] != LAST);
  assign ready     = !last_busy;
  assign done      = r_v[K-1] && (r_rnd[K-1] == LAST);
  assign x_m       = s_x[K-1];
  assign y_m       = s_y[K-1];
  assign z_m       = s_z[K-1];

  // input multiplexer and first ring register
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      r_v[0]   <= 1'b0;
      r_rnd[0] <= '0;
      r_md[0]  <= MODE_ROTATE;
      r_x[0]   <= '0;
      r_y[0]   <= '0;
      r_z[0]   <= '0;
    end else if (last_busy) begin
      r_v[0]   <= 1'b1;
      r_rnd[0] <= r_rnd[K-1] + 1'b1;
      r_md[0]  <= r_md[K-1];
      r_x[0]   <= s_x[K-1];
      r_y[0]   <= s_y[K-1];
      r_z[0]   <= s_z[K-1];
    end else begin
      r_v[0]   <= init;
      r_rnd[0] <= '0;
      r_md[0]  <= mode;
      r_x[0]   <= x0;
      r_y[0]   <= y0;
      r_z[0]   <= z0;
    end
  end

  // pipeline registers between the unrolled stages
  for (genvar j = 1; j < K; j++) begin : g_pipe
    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) begin
        r_v[j]   <= 1'b0;
        r_rnd[j] <= '0;
        r_md[j]  <= MODE_ROTATE;
        r_x[j]   <= '0;
        r_y[j]   <= '0;
        r_z[j]   <= '0;
      end else begin
        r_v[j]   <= r_v[j-1];
        r_rnd[j] <= r_rnd[j-1];
        r_md[j]  <= r_md[j-1];
        r_x[j]   <= s_x[j-1];
        r_y[j]   <= s_y[j-1];
        r_z[j]   <= s_z[j-1];
      end
    end
  end

`ifndef SYNTHESIS
  // an init while the ring slot is taken would be lost
  assert property (@(posedge clk) disable iff (!rst_n) init |-> ready)
    else $error("cordic_core: init while not ready");
`endif
endmodule
