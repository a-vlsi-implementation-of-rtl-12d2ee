// mot_fxdiv: sequential fixed-point divider used by a leaf for DIV and SIMPLEDIV.
//
// q = (a << FRAC_W) / b, both signed fixed point. A restoring divider works on the
// magnitudes and produces one quotient bit per cycle, so a division takes
// CYCLES = DATA_W + FRAC_W cycles from the start pulse to the done pulse (the T_D of the
// design, whose value the design leaves open). The quotient truncates towards zero and
// saturates to the largest magnitude if it does not fit in DATA_W bits. The caller must not
// start it with b = 0. A start while busy is ignored.
module mot_fxdiv
  import mot_pkg::*;
(
  input  logic  clk,
  input  logic  rst_n,
  input  logic  start,
  input  data_t a,       // dividend
  input  data_t b,       // divisor, nonzero
  output logic  busy,
  output logic  done,    // one-cycle pulse, q valid in the same cycle
  output data_t q
);

  localparam int NW = DATA_W + FRAC_W;  // dividend bits after scaling
  localparam int CW = $clog2(NW + 1);

  logic [NW-1:0]     num;   // shifts out dividend bits, shifts in quotient bits
  logic [DATA_W-1:0] rem;
  logic [DATA_W-1:0] den;
  logic              neg;
  logic [CW-1:0]     cnt;

  logic [DATA_W:0]   rem_sh;
  data_t             a_mag, b_mag;
  assign a_mag = a[DATA_W-1] ? -a : a;
  assign b_mag = b[DATA_W-1] ? -b : b;
  logic              ge;
  assign rem_sh = {rem, num[NW-1]};
  assign ge     = rem_sh >= {1'b0, den};

  logic [NW-1:0] qmag;
  assign qmag = {num[NW-2:0], ge};

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      num <= '0; rem <= '0; den <= '0; neg <= 1'b0; cnt <= '0;
      busy <= 1'b0; done <= 1'b0; q <= '0;
    end else begin
      done <= 1'b0;
      if (!busy) begin
        if (start) begin
          num  <= {a_mag, {FRAC_W{1'b0}}};
          den  <= b_mag;
          neg  <= a[DATA_W-1] ^ b[DATA_W-1];
          rem  <= '0;
          cnt  <= CW'(NW);
          busy <= 1'b1;
        end
      end else begin
        rem <= ge ? DATA_W'(rem_sh - {1'b0, den}) : rem_sh[DATA_W-1:0];
        num <= qmag;
        cnt <= cnt - 1'b1;
        if (cnt == CW'(1)) begin
          busy <= 1'b0;
          done <= 1'b1;
          if (qmag > NW'(DATA_MAX)) q <= neg ? -DATA_MAX : DATA_MAX;
          else                      q <= neg ? -data_t'(qmag) : data_t'(qmag);
        end
      end
    end
  end

endmodule
