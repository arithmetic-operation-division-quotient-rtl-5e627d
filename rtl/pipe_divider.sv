// pipe_divider: the signed divider organized as a micro-pipeline.
//
// The same datapath as div_comb_core, cut by stage registers (RGF) so that a
// sequence of divisions is computed at one result per clock cycle. Stages,
// for W-bit operands and L = W-1 array levels (NS = W+4 stages in all):
//   0        RG X, RG Y         the operands
//   1        RGF Wx, RGF Wy     after the left normalization (SHL X, SHL Y)
//   2        RGF N,K            after the adder that forms N and K
//   3..2+L   RGF R_m            one array level (ADD) per stage; the digits
//                               collect in the Z' field beside it, and the
//                               partial remainder of level N is kept as R_N
//   3+L      RGF Z', RGF R_(k-l) the quotient digits aligned by the shift
//                               array, the correction decided, and the
//                               remainder's partial remainder restored (ADD)
//   4+L      RG Z, RG R         Z' + COR (half adders), and the remainder
//                               shifted right (SHR)
// Every stage carries one packed record; fields a stage does not use yet are
// carried unchanged. Each stage has its own pipe_stage_ctrl state machine.
//
// frac selects fractional (mantissa) mode per operation, as in div_comb_core:
// the normalization stage passes the operands through and N = W-1, K = 0.
//
// Interface: in_valid/in_ready accept an operand pair (x, y) and its mode
// bit; out_valid/
// out_ready hand out the quotient z and the remainder r. With out_ready held
// high a result appears NS cycles after it was accepted and one operation
// per cycle is sustained; with out_ready low the pipeline fills and then
// deasserts in_ready. Results for Y = 0 and for -2^(W-1)/-1 are meaningless.
// The stage order follows the pipeline structure of the description; the
// record layout, the handshake and the reset (asynchronous, active low,
// empties every stage) are this design's own.
module pipe_divider #(
  parameter  int unsigned W  = div_pkg::DIV_W,
  localparam int unsigned CW = $clog2(W),
  localparam int unsigned NW = CW + 2,
  localparam int unsigned L  = W - 1,
  localparam int unsigned NS = W + 4
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         in_valid,
  output logic         in_ready,
  input  logic         frac,
  input  logic [W-1:0] x,
  input  logic [W-1:0] y,
  output logic         out_valid,
  input  logic         out_ready,
  output logic [W-1:0] z,
  output logic [W-1:0] r
);

  typedef struct packed {
    logic                 frac;     // fractional mode
    logic [W-1:0]         x;        // dividend as given
    logic [W-1:0]         y;        // divisor as given
    logic [W-1:0]         wx;       // normalized dividend
    logic [W-1:0]         wy;       // normalized divisor
    logic [CW-1:0]        sy;       // divisor normalization shift
    logic [CW-1:0]        sx;       // dividend normalization shift
    logic signed [NW-1:0] n_dig;    // N
    logic [CW-1:0]        k;        // K
    logic                 n_pos;    // N >= 1
    logic [W-1:0]         r;        // latest partial remainder R_m
    logic                 sub;      // operation of the next level (CS-)
    logic [W-1:0]         r_last;   // R_N
    logic [L-1:0]         dig;      // quotient digits (Z')
    logic [L-1:0]         zero_lv;  // R_m == 0 flags
    logic [W-1:0]         zq;       // aligned quotient
    logic                 cor;      // quotient correction
    logic [W-1:0]         rq;       // restored / final remainder
    logic [W-1:0]         z;        // final quotient
  } stage_t;

  stage_t d [NS];
  stage_t q [NS];

  logic [NS-1:0] st_in_valid, st_in_ready, st_load, st_valid, st_out_ready;

  // ---------------------------------------------------------------- control
  for (genvar s = 0; s < NS; s++) begin : g_ctrl
    if (s == 0) begin : g_first
      assign st_in_valid[s] = in_valid;
    end else begin : g_mid
      assign st_in_valid[s] = st_valid[s-1];
    end
    if (s == NS - 1) begin : g_last
      assign st_out_ready[s] = out_ready;
    end else begin : g_inner
      assign st_out_ready[s] = st_in_ready[s+1];
    end
    pipe_stage_ctrl u_ctrl (
      .clk       (clk),
      .rst_n     (rst_n),
      .in_valid  (st_in_valid[s]),
      .in_ready  (st_in_ready[s]),
      .load      (st_load[s]),
      .valid     (st_valid[s]),
      .out_ready (st_out_ready[s])
    );
  end

  assign in_ready  = st_in_ready[0];
  assign out_valid = st_valid[NS-1];
  assign z         = q[NS-1].z;
  assign r         = q[NS-1].rq;

  // -------------------------------------------------------------- datapath
  // stage 0: RG X, RG Y
  always_comb begin
    d[0]      = '0;
    d[0].frac = frac;
    d[0].x    = x;
    d[0].y    = y;
  end

  // stage 1: SHL X, SHL Y
  stage_t s1;
  logic [W-1:0]  s1_wx, s1_wy;
  logic [CW-1:0] s1_sx, s1_sy;
  lead_norm #(.W(W)) u_norm_x (.v(q[0].x), .wn(s1_wx), .s(s1_sx));
  lead_norm #(.W(W)) u_norm_y (.v(q[0].y), .wn(s1_wy), .s(s1_sy));
  always_comb begin
    s1    = q[0];
    s1.wx = q[0].frac ? q[0].x : s1_wx;
    s1.wy = q[0].frac ? q[0].y : s1_wy;
    s1.sx = q[0].frac ? '0 : s1_sx;
    s1.sy = q[0].frac ? '0 : s1_sy;
  end
  assign d[1] = s1;

  // stage 2: ADD forming N and K
  stage_t s2;
  logic signed [NW-1:0] s2_n;
  logic [CW-1:0]        s2_k;
  logic                 s2_pos;
  nk_adder #(.W(W)) u_nk (.frac(q[1].frac), .sx(q[1].sx), .sy(q[1].sy), .n_dig(s2_n), .k(s2_k), .n_pos(s2_pos));
  always_comb begin
    s2       = q[1];
    s2.n_dig = s2_n;
    s2.k     = s2_k;
    s2.n_pos = s2_pos;
    s2.r     = q[1].wx;
    s2.sub   = ~(q[1].wx[W-1] ^ q[1].wy[W-1]);
  end
  assign d[2] = s2;

  // stages 3 .. 2+L: one array level each
  for (genvar m = 1; m <= L; m++) begin : g_level
    stage_t       nxt;
    logic [W-1:0] r_m;
    logic         z_m, zero_m;
    div_level #(.W(W), .FIRST(m == 1)) u_level (
      .r_prev (q[m+1].r),
      .wy     (q[m+1].wy),
      .sub    (q[m+1].sub),
      .r      (r_m),
      .z      (z_m),
      .zero   (zero_m)
    );
    always_comb begin
      nxt                = q[m+1];
      nxt.r              = r_m;
      nxt.sub            = z_m;
      nxt.dig[L-m]       = z_m;
      nxt.zero_lv[m-1]   = zero_m;
      if (q[m+1].n_dig == NW'(m)) nxt.r_last = r_m;
    end
    assign d[m+2] = nxt;
  end

  // stage 3+L: align Z' (shift array), decide COR, restore R_(k-l)
  stage_t       sa;
  logic [W-1:0] sa_zq, sa_rfix;
  logic         sa_cor;
  shift_array #(.W(W)) u_zshift (
    .a  ({q[L+2].x[W-1] ^ q[L+2].y[W-1], q[L+2].dig}),
    .sh (q[L+2].k),
    .y  (sa_zq)
  );
  quot_correction #(.W(W)) u_cor (
    .xs(q[L+2].x[W-1]), .ys(q[L+2].y[W-1]), .zero_lv(q[L+2].zero_lv),
    .n_dig(q[L+2].n_dig), .eq(), .cor1(), .cor2(), .cor3(), .cor(sa_cor)
  );
  rem_restore #(.W(W)) u_restore (
    .r_last (q[L+2].r_last),
    .wy     (q[L+2].wy),
    .z0     (sa_zq[0] ^ sa_cor),
    .r_fix  (sa_rfix)
  );
  always_comb begin
    sa     = q[L+2];
    sa.zq  = sa_zq;
    sa.cor = sa_cor;
    sa.rq  = sa_rfix;
  end
  assign d[L+3] = sa;

  // stage 4+L: ADD (+COR) into RG Z, SHR into RG R
  stage_t       sf;
  logic [W-1:0] sf_z, sf_r;
  half_adder_inc #(.W(W)) u_zinc (.a(q[L+3].zq), .cin(q[L+3].cor), .s(sf_z));
  shift_array #(.W(W)) u_rshift (.a(q[L+3].rq), .sh(q[L+3].sy), .y(sf_r));
  always_comb begin
    sf    = q[L+3];
    sf.z  = sf_z;
    sf.rq = q[L+3].n_pos ? sf_r : q[L+3].x;
  end
  assign d[L+4] = sf;

  // stage registers
  always_ff @(posedge clk) begin
    for (int s = 0; s < NS; s++) begin
      if (st_load[s]) q[s] <= d[s];
    end
  end

endmodule
