// interp_fir: raised-cosine interpolation filter for one real baseband stream
// (one of FA1_I, FA1_Q, FA2_I, FA2_Q).
//
// The output runs at the 64 MHz sample clock, one sample every cycle. The input
// rate depends on the profile. in_req goes high on the cycle din is taken:
//   7 MHz profile    every 4 cycles  (16 MHz)   one x4 stage,  fc 3.5 MHz
//   3.5 MHz profile  every 8 cycles  (8 MHz)    one x8 stage,  fc 2 MHz
//   1.75 MHz profile every 16 cycles (4 MHz)    x2 stage at 8 MHz (fc 1.2 MHz),
//                                               then the x8 stage (fc 2 MHz)
// Each stage is a 129-tap filter working on the zero-stuffed input: the sample
// enters on its request cycle and zeros enter on the other cycles of the stage's
// clock enable. Coefficients carry the gain L, so a constant input gives the
// same constant at the output.
//
// Timing: with the single stage, dout answers a sample one cycle after in_req;
// the impulse response then appears one tap per cycle. In the 1.75 MHz profile
// the first stage adds 8 cycles (one 8 MHz period). Outputs are rounded and
// saturated to OUT_W bits. clr (a profile change) empties both delay lines and
// restarts the rate counter.
module interp_fir
  import dif_pkg::*;
#(
  parameter int unsigned IN_W  = 16,
  parameter int unsigned OUT_W = 16
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    clr,
  input  profile_t                profile,
  output logic                    in_req,
  input  logic signed [IN_W-1:0]  din,
  output logic signed [OUT_W-1:0] dout
);

  localparam int unsigned ACC_W = IN_W + COEF_W + $clog2(TAPS);

  logic [3:0] phase;           // position inside the slowest input period (16 cycles)
  logic       ce8;             // 8 MHz enable of the x2 first stage
  logic       main_stuff;      // main stage takes a non-zero sample this cycle
  logic signed [IN_W-1:0]  main_in, pre_in, pre_out;
  logic signed [ACC_W-1:0] main_acc, pre_acc;
  coef_set_t main_coefs;

  always_ff @(posedge clk) begin
    if (!rst_n || clr) phase <= '0;
    else               phase <= phase + 4'd1;
  end

  always_comb begin
    unique case (profile)
      PROF_7M:  in_req = (phase[1:0] == 2'd0);
      PROF_3M5: in_req = (phase[2:0] == 3'd0);
      default:  in_req = (phase == 4'd0);
    endcase
    ce8        = (phase[2:0] == 3'd0);
    main_stuff = (profile == PROF_7M) ? (phase[1:0] == 2'd0) : ce8;
    main_coefs = (profile == PROF_7M) ? COEF_7M : COEF_3M5;
  end

  // First stage (1.75 MHz profile only): x2 at 8 MHz.
  assign pre_in = (in_req) ? din : '0;

  rc_fir #(.IN_W(IN_W)) u_pre (
    .clk, .rst_n, .clr,
    .ce    (ce8 && profile == PROF_1M75),
    .din   (pre_in),
    .coefs (COEF_1M75),
    .acc   (pre_acc)
  );

  assign pre_out = IN_W'(sat((64'(pre_acc) + (64'sd1 <<< (COEF_FRAC - 1))) >>> COEF_FRAC, IN_W));

  // Main stage at 64 MHz on the zero-stuffed stream.
  always_comb begin
    if (!main_stuff)                 main_in = '0;
    else if (profile == PROF_1M75)   main_in = pre_out;
    else                             main_in = din;
  end

  rc_fir #(.IN_W(IN_W)) u_main (
    .clk, .rst_n, .clr,
    .ce    (1'b1),
    .din   (main_in),
    .coefs (main_coefs),
    .acc   (main_acc)
  );

  assign dout = OUT_W'(sat((64'(main_acc) + (64'sd1 <<< (COEF_FRAC - 1))) >>> COEF_FRAC, OUT_W));

endmodule
