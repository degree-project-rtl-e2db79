// ic_angle: intensity-centroid orientation of a 31x31 patch.
//
// The moments m10 = sum(x * I) and m01 = sum(y * I) are taken over the disc
// x^2 + y^2 <= 15^2 around the patch centre (x to the right, y down). The
// orientation theta = atan2(m01, m10) is then reduced to one of 30 bins of 12
// degrees, bin k covering [12k - 6, 12k + 6) degrees. No arctangent or division
// is computed: the vector (m10, m01) lies in sector k exactly when it is
// counter-clockwise of (or on) the lower bound and clockwise of the upper bound,
// which two cross products with Q2.14 unit vectors decide. The moment equations,
// the 30-bin discretisation and the use of fixed point follow the ORB method;
// the disc radius, the row-serial moment pass and the sector search are this
// design's own choices.
//
// Timing: `start` (one cycle) begins on `patch`, which must stay stable until
// `done`. One patch row is summed per cycle (31 cycles), then one sector is
// tried per cycle (at most 30 cycles). `done` pulses for one cycle with m10,
// m01 and bin valid; they hold until the next start. A zero moment vector gives
// bin 0.
module ic_angle
  import orb_pkg::*;
(
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    start,
  input  patch_t                  patch,
  output logic                    busy,
  output logic                    done,
  output logic signed [MOM_W-1:0] m10,
  output logic signed [MOM_W-1:0] m01,
  output logic [BIN_W-1:0]        bin
);
  typedef enum logic [1:0] {S_IDLE, S_MOM, S_SEARCH} state_t;
  state_t state;

  logic [4:0]              row;
  logic [BIN_W-1:0]        k;
  logic signed [17:0]      row_xi;    // sum of x*I over one row
  logic [13:0]             row_i;     // sum of I over one row
  logic signed [MOM_W-1:0] row_yi;
  logic signed [15:0]      lo_c, lo_s, hi_c, hi_s;
  logic signed [MOM_W+16:0] cr_lo, cr_hi;
  logic                    in_sector;

  // disc membership of patch position (row v, column u)
  function automatic logic in_disc(input int v, input int u);
    return (v - HALF) * (v - HALF) + (u - HALF) * (u - HALF) <= HALF * HALF;
  endfunction

  always_comb begin
    row_xi = '0;
    row_i  = '0;
    for (int u = 0; u < PATCH; u++) begin
      if (in_disc(int'(row), u)) begin
        row_xi = row_xi + 18'(u - HALF) * $signed({10'd0, patch[row][u]});
        row_i  = row_i + 14'(patch[row][u]);
      end
    end
    row_yi = MOM_W'($signed({1'b0, row}) - 6'sd15) * $signed({1'b0, row_i});
  end

  // sector k spans (12k - 6) .. (12k + 6) degrees = 6-degree steps 2k-1 .. 2k+1
  always_comb begin
    lo_c = cos6(2 * 32'(k) + 59);
    lo_s = sin6(2 * 32'(k) + 59);
    hi_c = cos6(2 * 32'(k) + 1);
    hi_s = sin6(2 * 32'(k) + 1);
    cr_lo = (MOM_W+17)'(lo_c) * (MOM_W+17)'(m01) - (MOM_W+17)'(lo_s) * (MOM_W+17)'(m10);
    cr_hi = (MOM_W+17)'(hi_c) * (MOM_W+17)'(m01) - (MOM_W+17)'(hi_s) * (MOM_W+17)'(m10);
    in_sector = (cr_lo >= 0) && (cr_hi < 0);
  end

  assign busy = (state != S_IDLE);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_IDLE;
      row   <= '0;
      k     <= '0;
      m10   <= '0;
      m01   <= '0;
      bin   <= '0;
      done  <= 1'b0;
    end else begin
      done <= 1'b0;
      case (state)
        S_IDLE: if (start) begin
          state <= S_MOM;
          row   <= '0;
          m10   <= '0;
          m01   <= '0;
        end
        S_MOM: begin
          m10 <= m10 + MOM_W'(row_xi);
          m01 <= m01 + row_yi;
          row <= row + 5'd1;
          if (row == 5'(PATCH - 1)) begin
            state <= S_SEARCH;
            k     <= '0;
          end
        end
        S_SEARCH: begin
          if (m10 == 0 && m01 == 0) begin
            bin   <= '0;
            done  <= 1'b1;
            state <= S_IDLE;
          end else if (in_sector || k == BIN_W'(N_BINS - 1)) begin
            bin   <= k;
            done  <= 1'b1;
            state <= S_IDLE;
          end else begin
            k <= k + 1'b1;
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end
endmodule
