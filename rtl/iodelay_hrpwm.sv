// iodelay_hrpwm: IODELAYE1-based synchronous high-resolution PWM.
//
// An (m+1)-bit duty command dc = DC_W bits sets a pulse of dc taps out of a
// period of 2^DC_W taps. The upper DC_W-5 bits count whole cycles of the fast
// clock CK2; the lower 5 bits set a programmable I/O delay line of 32 taps
// whose full span is one CK2 cycle, i.e. half a period of the calibration
// reference CK_REF.
//
//   mmcm        board clock CK -> CK2 = CK*M/(D*O0) (counter, flip-flops,
//               delay line control clock C) and CK_REF = CK*M/(D*O1)
//               (reference of the delay-line calibration). M = 8, D = 2,
//               O0 = 2, O1 = 4: CK2 = 2*CK, CK_REF = CK.
//   idelayctrl  calibrates the delay line against CK_REF.
//   counter     (DC_W-5)-bit hrpwm_counter on CK2.
//   comparator  SETD at count 0, CLRD at count dc(m:5).
//   FFa, FFb    register SETD -> SET and CLRD -> CLR on CK2, removing
//               comparator glitches.
//   iodelaye1   loadable-variable mode; delays CLR by dc(4:0) taps -> RESET.
//               Its RST pin is the load strobe NVALUE, asserted in the
//               counter's last state, so the new dc(4:0) is loaded on the CK2
//               edge that starts the next period (the same edge that
//               registers the new dc for the comparator).
//   output      hrpwm_sr_ff set by SET, cleared by RESET.
//
// Channels: NCH independent PWM outputs share the MMCM, the calibration
// block and the counter; each channel has its own duty command, comparator,
// FFa/FFb, delay line and output flip-flop (a delay line per output pin).
//
// Timing: PWM rises one CK2 cycle after the counter reaches 0, and falls
// dc(m:5) cycles plus dc(4:0) taps later. Example, dc = 8'b100_10011: CLRD
// is high while CNT = 4, CLR during CNT = 5, RESET 19 taps into that cycle;
// the pulse is 4*32 + 19 = 147 taps. The core stays in reset until the MMCM
// is locked and the calibration block is ready.
//
// The structure, widths, MMCM settings and the Fig.-style timing follow the
// modulator's description; the NVALUE timing, the zero-duty handling and the
// edge-triggered output stage are this design's choices.
`timescale 1ns/1fs
module iodelay_hrpwm
  import hrpwm_pkg::*;
#(
  parameter int unsigned DC_W = 8,
  parameter int unsigned NCH  = 1
) (
  input  logic                      clk_in,
  input  logic                      rst_n,
  input  logic [NCH-1:0][DC_W-1:0]  dc,
  output logic [NCH-1:0]            pwm,
  output logic                      ready
);

  localparam int unsigned FINE_W = IOD_TAP_W;
  localparam int unsigned CNT_W  = DC_W - FINE_W;

  logic [6:0] mmcm_out;
  logic       mmcm_fb, mmcm_locked, ctrl_rdy;
  logic       ck2, ck_ref;

  mmcm #(
    .M (8),
    .D (2),
    .O ('{2, 4, 1, 1, 1, 1, 1})
  ) u_mmcm (
    .CLKIN1   (clk_in),
    .CLKFBIN  (mmcm_fb),
    .RST      (~rst_n),
    .CLKOUT   (mmcm_out),
    .CLKFBOUT (mmcm_fb),
    .LOCKED       (mmcm_locked),
    .CLKINSTOPPED (),
    .CLKFBSTOPPED ()
  );

  assign ck2    = mmcm_out[0];
  assign ck_ref = mmcm_out[1];

  idelayctrl u_ctrl (
    .REFCLK (ck_ref),
    .RST    (~mmcm_locked),
    .RDY    (ctrl_rdy)
  );

  assign ready = mmcm_locked & ctrl_rdy;

  logic core_rst_n;
  assign core_rst_n = rst_n & ready;

  logic [CNT_W-1:0] cnt;
  logic             last;

  hrpwm_counter #(.W(CNT_W)) u_cnt (
    .clk (ck2), .rst_n (core_rst_n), .cnt (cnt), .last (last)
  );

  // NVALUE: load the next fractional part at the period boundary.
  logic nvalue;
  assign nvalue = last;

  for (genvar c = 0; c < NCH; c++) begin : g_ch
    logic              setd, clrd;
    logic [FINE_W-1:0] fine;
    logic              set_q, clr_q, reset_d;
    logic [FINE_W-1:0] tap_now;

    hrpwm_comparator #(.DC_W(DC_W), .FINE_W(FINE_W)) u_cmp (
      .clk (ck2), .rst_n (core_rst_n), .dc (dc[c]), .cnt (cnt), .last (last),
      .setd (setd), .clrd (clrd), .fine (fine)
    );

    // FFa and FFb.
    always_ff @(posedge ck2 or negedge core_rst_n) begin
      if (!core_rst_n) begin
        set_q <= 1'b0;
        clr_q <= 1'b0;
      end else begin
        set_q <= setd;
        clr_q <= clrd;
      end
    end

    iodelaye1 #(.MODE(IOD_VAR_LOADABLE)) u_dly (
      .C           (ck2),
      .RST         (nvalue),
      .CE          (1'b0),
      .INC         (1'b0),
      .CNTVALUEIN  (dc[c][FINE_W-1:0]),
      .DATAIN      (clr_q),
      .DATAOUT     (reset_d),
      .CNTVALUEOUT (tap_now)
    );

    hrpwm_sr_ff u_sr (
      .rst_n (core_rst_n), .set_i (set_q), .reset_i (reset_d), .q (pwm[c])
    );

    // The delay line must hold what the comparator holds.
    always @(posedge ck2) begin
      if (core_rst_n && cnt == CNT_W'(1))
        assert (tap_now == fine) else $error("iodelay_hrpwm: channel %0d tap %0d != dc(4:0) %0d", c, tap_now, fine);
    end
  end

endmodule
