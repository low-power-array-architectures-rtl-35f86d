// me_control: scan counters and sequencing of the low-power array.
//
// A search is started by a one-cycle start while idle. The input side then
// scans the search area in the order of the algorithm: for each candidate
// line l = 0..P, for each reference row i = 0..N-1, search-area row l+i is
// read in raster order, column q = 0..N+P-1, one pixel per cycle (sa_rd,
// sa_row, sa_col). That is (N+P)*N*(P+1) cycles per reference block.
//
// Derived input-side signals:
//   * ref_row: the reference row the PEs use. It switches to row i when
//     column N of search-area row l+i is at the input (q == N), i.e. N cycles
//     after the row started; this instant lies in the idle gap of every PE.
//   * dis_en: the cycles in which the blocking shift register output is a
//     valid disable: column q = c + N - 1 of a row other than the first row of
//     a line (the first row of a line is never blocked).
//
// The output side is a second copy of the scan counters, started 2N-1 cycles
// after the input side, so that it names the candidate whose row sum is
// leaving the last PE: valid while its column counter c <= P, with first_row
// (i == 0), last_row (i == N-1), l_idx and c_idx. After the last candidate
// of the last line, done pulses for one cycle and busy falls: done is high
// (N+P)*N*(P+1) + N cycles after the first input cycle.
//
// The loop order follows the single-assignment algorithm; the counters, the
// handshake (start/busy/done) and all timing offsets are this design's own.
module me_control #(
  parameter int N  = me_pkg::DEFAULT_N,
  parameter int P  = me_pkg::DEFAULT_P,
  localparam int QW = me_pkg::idx_w(N + P),
  localparam int IW = me_pkg::idx_w(N),
  localparam int CW = me_pkg::idx_w(P + 1),
  localparam int LW = me_pkg::idx_w(2 * N)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          start,
  output logic          busy,
  output logic          clear,      // start accepted (one cycle)
  output logic          done,       // results valid (one cycle)
  // input side
  output logic          sa_rd,
  output logic [QW-1:0] sa_row,
  output logic [QW-1:0] sa_col,
  output logic [IW-1:0] ref_row,
  output logic          dis_en,
  // output side
  output logic          valid,
  output logic          first_row,
  output logic          last_row,
  output logic [CW-1:0] l_idx,
  output logic [CW-1:0] c_idx
);

  typedef struct packed {
    logic [CW-1:0] l;
    logic [IW-1:0] i;
    logic [QW-1:0] q;
  } scan_t;

  localparam scan_t SCAN_LAST_IN = '{l: CW'(P), i: IW'(N - 1), q: QW'(N + P - 1)};
  localparam scan_t SCAN_LAST_OUT = '{l: CW'(P), i: IW'(N - 1), q: QW'(P)};

  function automatic scan_t scan_next(input scan_t s);
    scan_t r = s;
    if (s.q == QW'(N + P - 1)) begin
      r.q = '0;
      if (s.i == IW'(N - 1)) begin
        r.i = '0;
        r.l = s.l + 1'b1;
      end else begin
        r.i = s.i + 1'b1;
      end
    end else begin
      r.q = s.q + 1'b1;
    end
    return r;
  endfunction

  scan_t         sin, sout;
  logic          in_act, out_act;
  logic [LW-1:0] lag;

  assign clear = start && !busy;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy    <= 1'b0;
      done    <= 1'b0;
      in_act  <= 1'b0;
      out_act <= 1'b0;
      lag     <= '0;
      sin     <= '0;
      sout    <= '0;
    end else begin
      done <= 1'b0;
      if (clear) begin
        busy    <= 1'b1;
        in_act  <= 1'b1;
        out_act <= 1'b0;
        lag     <= '0;
        sin     <= '0;
        sout    <= '0;
      end else if (busy) begin
        if (in_act) begin
          if (sin == SCAN_LAST_IN) in_act <= 1'b0;
          else sin <= scan_next(sin);
        end
        if (!out_act) begin
          lag <= lag + 1'b1;
          if (lag == LW'(2 * N - 2)) out_act <= 1'b1;
        end else if (sout == SCAN_LAST_OUT) begin
          out_act <= 1'b0;
          busy    <= 1'b0;
          done    <= 1'b1;
        end else begin
          sout <= scan_next(sout);
        end
      end
    end
  end

  always_comb begin
    sa_rd     = in_act;
    sa_row    = QW'(sin.l) + QW'(sin.i);
    sa_col    = sin.q;
    if (sin.q >= QW'(N)) ref_row = sin.i;
    else                 ref_row = (sin.i == '0) ? IW'(N - 1) : sin.i - 1'b1;
    dis_en    = in_act && (sin.i != '0) && (sin.q >= QW'(N - 1));
    valid     = out_act && (sout.q <= QW'(P));
    first_row = (sout.i == '0);
    last_row  = (sout.i == IW'(N - 1));
    l_idx     = sout.l;
    c_idx     = CW'(sout.q);
  end

  // Sequencing rules.
  a_rd_busy:    assert property (@(posedge clk) disable iff (!rst_n) sa_rd |-> busy);
  a_valid_busy: assert property (@(posedge clk) disable iff (!rst_n) valid |-> busy);
  a_done_pulse: assert property (@(posedge clk) disable iff (!rst_n) done |=> !done);
  a_done_idle:  assert property (@(posedge clk) disable iff (!rst_n) done |-> !busy);

endmodule
