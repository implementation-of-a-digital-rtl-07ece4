// decim_fir: raised-cosine decimation filter for one real stream of the
// receiver (one of FA1_I, FA1_Q, FA2_I, FA2_Q after demodulation).
//
// The input runs at the 64 MHz sample clock, one sample every cycle. The
// receiver uses the same filters as the transmitter, in mirror order:
//   7 MHz profile    /4 with the fc 3.5 MHz set                -> 16 MHz
//   3.5 MHz profile  /8 with the fc 2 MHz set                  -> 8 MHz
//   1.75 MHz profile /8 with the fc 2 MHz set, then /2 at 8 MHz
//                    with the fc 1.2 MHz set                   -> 4 MHz
// The coefficient sets carry a gain of L (they are the interpolator's), so each
// stage divides its sum by its own L to keep a DC gain of one. Only every L-th
// sum is kept: out_valid pulses once every 4, 8 or 16 cycles and dout holds the
// value in between.
//
// Timing: the sum that includes the sample taken at clock edge n is
// registered at edge n. If n is a decimation instant (n = 0 mod L after a
// clear), out_valid and dout show that sum after edge n+1. The 1.75 MHz
// profile's second stage shows it after edge n+3. clr (a profile change) empties both
// delay lines and restarts the rate counter.
module decim_fir
  import dif_pkg::*;
#(
  parameter int unsigned IN_W  = 16,
  parameter int unsigned OUT_W = 16
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    clr,
  input  profile_t                profile,
  input  logic signed [IN_W-1:0]  din,
  output logic                    out_valid,
  output logic signed [OUT_W-1:0] dout
);

  localparam int unsigned ACC_W = IN_W + COEF_W + $clog2(TAPS);

  logic [3:0] phase;
  logic       main_dec;          // main stage sum is kept this cycle
  logic       main_dec_q, post_dec_q;
  logic signed [ACC_W-1:0] main_acc, post_acc;
  logic signed [IN_W-1:0]  main_q;    // main stage output, 16 or 8 MHz
  coef_set_t main_coefs;
  int unsigned main_shift;

  always_ff @(posedge clk) begin
    if (!rst_n || clr) phase <= '0;
    else               phase <= phase + 4'd1;
  end

  always_comb begin
    main_dec   = (profile == PROF_7M) ? (phase[1:0] == 2'd0) : (phase[2:0] == 3'd0);
    main_coefs = (profile == PROF_7M) ? COEF_7M : COEF_3M5;
    main_shift = (profile == PROF_7M) ? COEF_FRAC + 2 : COEF_FRAC + 3;
  end

  rc_fir #(.IN_W(IN_W)) u_main (
    .clk, .rst_n, .clr,
    .ce    (1'b1),
    .din   (din),
    .coefs (main_coefs),
    .acc   (main_acc)
  );

  // Keep every L-th sum of the main stage (the sum registered in the cycle
  // after the phase that selects it).
  always_ff @(posedge clk) begin
    if (!rst_n || clr) begin
      main_dec_q <= 1'b0;
      main_q     <= '0;
    end else begin
      main_dec_q <= main_dec;
      if (main_dec_q)
        main_q <= IN_W'(sat((64'(main_acc) + (64'sd1 <<< (main_shift - 1))) >>> main_shift, IN_W));
    end
  end

  // Second stage (1.75 MHz profile): /2 at 8 MHz. It consumes main_q one
  // cycle after main_q is updated and keeps every second sum.
  logic       post_ce, post_keep;
  logic       main_upd_q;

  always_ff @(posedge clk) begin
    if (!rst_n || clr) main_upd_q <= 1'b0;
    else               main_upd_q <= main_dec_q;
  end

  assign post_ce   = main_upd_q && (profile == PROF_1M75);
  assign post_keep = post_ce && (phase[3] == 1'b0);

  rc_fir #(.IN_W(IN_W)) u_post (
    .clk, .rst_n, .clr,
    .ce    (post_ce),
    .din   (main_q),
    .coefs (COEF_1M75),
    .acc   (post_acc)
  );

  always_ff @(posedge clk) begin
    if (!rst_n || clr) post_dec_q <= 1'b0;
    else               post_dec_q <= post_keep;
  end

  always_ff @(posedge clk) begin
    if (!rst_n || clr) begin
      out_valid <= 1'b0;
      dout      <= '0;
    end else if (profile == PROF_1M75) begin
      out_valid <= post_dec_q;
      if (post_dec_q)
        dout <= OUT_W'(sat((64'(post_acc) + (64'sd1 <<< COEF_FRAC)) >>> (COEF_FRAC + 1), OUT_W));
    end else begin
      out_valid <= main_dec_q;
      if (main_dec_q)
        dout <= OUT_W'(sat((64'(main_acc) + (64'sd1 <<< (main_shift - 1))) >>> main_shift, OUT_W));
    end
  end

endmodule
