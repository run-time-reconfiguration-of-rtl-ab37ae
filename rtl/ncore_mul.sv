// ncore_mul: iterative 32 x 32 multiplier (low 32 bits of the product).
//
// It retires four multiplier bits per cycle, the first in the start cycle,
// so a product is ready at most eight cycles after start. With fixed low it stops as soon as the remaining
// multiplier bits are all zero (early exit: a multiplier below 16 is done
// one cycle after start). With fixed high it always takes the full eight cycles: the
// synchronous and SIMD modes need a data-independent execution time, and the
// paper names early-exit multiplication as what is disabled there. The
// radix and the cycle counts are this design's choices.
// Interface: a one-cycle start pulse loads a and b; done rises once the
// product p is valid and stays high until the next start.
module ncore_mul #(
  parameter int unsigned XLEN = 32
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            start,
  input  logic            fixed,
  input  logic [XLEN-1:0] a,
  input  logic [XLEN-1:0] b,
  output logic            done,
  output logic [XLEN-1:0] p
);
  localparam int unsigned STEPS = XLEN / 4;

  logic [XLEN-1:0] mcand_q, mplier_q, acc_q;
  logic [3:0]      cnt_q;
  logic            busy_q, fixed_q;
  logic [XLEN-1:0] acc_n, mplier_n;

  assign acc_n    = acc_q + mcand_q * XLEN'(mplier_q[3:0]);
  assign mplier_n = mplier_q >> 4;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      mcand_q <= '0; mplier_q <= '0; acc_q <= '0; cnt_q <= '0;
      busy_q <= 1'b0; fixed_q <= 1'b0; done <= 1'b0;
    end else if (start) begin
      // first step in the start cycle
      mcand_q  <= a << 4;
      mplier_q <= b >> 4;
      acc_q    <= a * XLEN'(b[3:0]);
      cnt_q    <= 4'd1;
      fixed_q  <= fixed;
      busy_q   <= fixed || ((b >> 4) != '0);
      done     <= !fixed && ((b >> 4) == '0);
    end else if (busy_q) begin
      acc_q    <= acc_n;
      mplier_q <= mplier_n;
      mcand_q  <= mcand_q << 4;
      cnt_q    <= cnt_q + 4'd1;
      if ((32'(cnt_q) == STEPS - 1) || (!fixed_q && mplier_n == '0)) begin
        busy_q <= 1'b0;
        done   <= 1'b1;
      end
    end
  end

  assign p = acc_q;
endmodule
