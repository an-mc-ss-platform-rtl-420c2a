// Carrier frequency offset estimator and corrector, in the time domain in
// front of the FFT.
// Estimation: the synchroniser's lag-LAG autocorrelation C = sum r(n)
// r*(n-LAG) over the periodic preamble has the angle 2*pi*LAG*eps, eps
// being the offset in cycles per sample. On every `est` pulse (a
// cross-correlation peak, C latched with it) an iterative CORDIC in
// vectoring mode computes angle(C) in 16 cycles, one micro-rotation per
// cycle, and the phase step -angle/LAG is kept; the last peak before
// synchronisation therefore sets the step.
// Correction: while `run` is high a PW-bit phase accumulator advances by the
// step on every received sample (`tick`, including the dropped cyclic
// prefix samples), and each passed sample is rotated by exp(j*phase) using a
// 2^TB-entry sine/cosine table computed at elaboration. The rotated sample
// leaves one cycle after it arrives. The phase restarts at 0 when `run`
// falls. The unambiguous range is +-1/(2*LAG) cycles per sample (+-312 kHz
// at 40 Msample/s). Estimating and correcting the offset before the FFT is
// the modem's; the CORDIC, table and widths are this design's choices.
module cfo_corrector #(
  parameter int DW  = 12,
  parameter int AW  = 48,
  parameter int LAG = 64,
  parameter int PW  = 24,
  parameter int TB  = 10
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 est,        // load a new autocorrelation value
  input  logic signed [AW-1:0] c_re,
  input  logic signed [AW-1:0] c_im,
  input  logic                 run,        // receiver synchronised: correct
  input  logic                 tick,       // one received sample has passed
  input  logic                 in_valid,
  input  logic                 in_first,
  input  logic signed [DW-1:0] in_i,
  input  logic signed [DW-1:0] in_q,
  output logic                 out_valid,
  output logic                 out_first,
  output logic signed [DW-1:0] out_i,
  output logic signed [DW-1:0] out_q,
  output logic signed [PW-1:0] step        // current phase step per sample
);
  localparam int  NIT = 16;
  localparam int  CW  = AW + 2;
  localparam real PI  = 3.14159265358979323846;
  localparam int  AMP = (1 << (DW - 1)) - 1;

  typedef logic signed [PW-1:0] at_arr_t [NIT];
  typedef logic signed [DW-1:0] tab_t [1 << TB];

  // atan(2^-i) in phase units of 2*pi / 2^PW
  function automatic at_arr_t mk_atan();
    at_arr_t a;
    for (int i = 0; i < NIT; i++)
      a[i] = PW'($rtoi($atan(1.0 / (2.0 ** i)) / (2.0 * PI) * (2.0 ** PW) + 0.5));
    return a;
  endfunction
  function automatic tab_t mk_tab(input bit sine);
    tab_t t;
    for (int k = 0; k < (1 << TB); k++)
      t[k] = DW'($rtoi($floor((sine ? $sin(2.0 * PI * k / (1 << TB)) : $cos(2.0 * PI * k / (1 << TB))) * AMP + 0.5)));
    return t;
  endfunction
  localparam at_arr_t ATAN = mk_atan();
  localparam tab_t    COS  = mk_tab(1'b0);
  localparam tab_t    SIN  = mk_tab(1'b1);

  // ---------------- CORDIC vectoring: z = angle(x + j y) ----------------
  logic signed [CW-1:0] x, y;
  logic signed [PW-1:0] z;
  logic [4:0]           it;
  logic                 act;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      x <= '0; y <= '0; z <= '0; it <= '0; act <= 1'b0; step <= '0;
    end else if (est) begin
      // pre-rotate into the right half plane
      if (c_re < 0) begin
        x <= -CW'(c_re); y <= -CW'(c_im); z <= PW'(1) <<< (PW - 1);
      end else begin
        x <= CW'(c_re);  y <= CW'(c_im);  z <= '0;
      end
      it  <= '0;
      act <= 1'b1;
    end else if (act) begin
      if (y > 0) begin
        x <= x + (y >>> it);
        y <= y - (x >>> it);
        z <= z + ATAN[it[3:0]];
      end else begin
        x <= x - (y >>> it);
        y <= y + (x >>> it);
        z <= z - ATAN[it[3:0]];
      end
      if (it == 5'(NIT - 1)) act <= 1'b0;
      it <= it + 5'd1;
    end else if (!run) begin
      // result of the last estimate; held while the receiver runs
      step <= -(z >>> $clog2(LAG));
    end
  end

  // ---------------- phase accumulator and rotation ----------------
  logic [PW-1:0] phase;
  logic signed [DW-1:0] cs, sn;
  logic signed [2*DW+1:0] pr, pq;

  always_ff @(posedge clk) begin
    if (!rst_n || !run) phase <= '0;
    else if (tick)      phase <= phase + PW'(step);
  end

  assign cs = COS[phase[PW-1 -: TB]];
  assign sn = SIN[phase[PW-1 -: TB]];

  function automatic logic signed [DW-1:0] sat(input logic signed [2*DW+1:0] v);
    if (v > (2*DW+2)'(AMP))  return DW'(AMP);
    if (v < -(2*DW+2)'(AMP)) return DW'(-AMP);
    return DW'(v);
  endfunction

  always_comb begin
    pr = (2*DW+2)'(in_i) * (2*DW+2)'(cs) - (2*DW+2)'(in_q) * (2*DW+2)'(sn);
    pq = (2*DW+2)'(in_i) * (2*DW+2)'(sn) + (2*DW+2)'(in_q) * (2*DW+2)'(cs);
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      out_first <= 1'b0;
      out_i     <= '0;
      out_q     <= '0;
    end else begin
      out_valid <= in_valid;
      out_first <= in_first;
      out_i     <= sat((pr + (2*DW+2)'(AMP / 2)) >>> (DW - 1));
      out_q     <= sat((pq + (2*DW+2)'(AMP / 2)) >>> (DW - 1));
    end
  end
endmodule
