// seq_divider: unsigned restoring divider that produces the switch off-time
// of the DOCC control law, quot = min(floor(num / den), QMAX).
//
// It is started with a one-clock start strobe. On that clock it checks whether
// num >= den << QW (or den = 0); in that case the quotient cannot be held in
// QW bits and the result is QMAX at once (sat_o set). Otherwise it develops one
// quotient bit per clock, most significant first, by comparing the partial
// remainder with the divisor shifted left by the bit's position and
// subtracting when it fits. The final quotient is clipped to QMAX.
// The division follows the design; its sequential form, the widths and the
// saturation are this design's choices.
//
// Timing: done_o is high for one clock, QW + 1 clocks after start (1 clock
// after start when saturated);
// quot_o and sat_o hold until the next start. busy_o is high in between, and a
// start while busy is ignored.
module seq_divider #(
  parameter int unsigned NW   = 27,     // dividend width
  parameter int unsigned DW   = 19,     // divisor width
  parameter int unsigned QW   = 11,     // quotient bits developed
  parameter int unsigned QMAX = 1024    // saturation value
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic           start,
  input  logic [NW-1:0]  num,
  input  logic [DW-1:0]  den,
  output logic           busy_o,
  output logic           done_o,
  output logic [QW-1:0]  quot_o,
  output logic           sat_o
);

  localparam int unsigned RW = ((NW > DW + QW) ? NW : DW + QW) + 1;
  localparam int unsigned BW = (QW > 1) ? $clog2(QW) : 1;

  logic [RW-1:0] rem, dsh;
  logic [QW-1:0] q;
  logic [BW-1:0] bit_idx;
  logic          run;

  logic [RW-1:0] num_ext, den_full;
  assign num_ext  = RW'(num);
  assign den_full = RW'(den) << QW;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rem     <= '0;
      dsh     <= '0;
      q       <= '0;
      bit_idx <= '0;
      run     <= 1'b0;
      busy_o  <= 1'b0;
      done_o  <= 1'b0;
      quot_o  <= '0;
      sat_o   <= 1'b0;
    end else begin
      done_o <= 1'b0;
      if (start && !busy_o) begin
        busy_o <= 1'b1;
        if (den == '0 || num_ext >= den_full) begin
          run    <= 1'b0;
          quot_o <= QW'(QMAX);
          sat_o  <= 1'b1;
          done_o <= 1'b1;
          busy_o <= 1'b0;
        end else begin
          run     <= 1'b1;
          sat_o   <= 1'b0;
          rem     <= num_ext;
          dsh     <= RW'(den) << (QW - 1);
          q       <= '0;
          bit_idx <= BW'(QW - 1);
        end
      end else if (run) begin
        logic          fits;
        logic [QW-1:0] q_new;
        fits  = (rem >= dsh);
        q_new = q | (fits ? (QW'(1) << bit_idx) : '0);
        if (fits)
          rem <= rem - dsh;
        q   <= q_new;
        dsh <= dsh >> 1;
        if (bit_idx == '0) begin
          run    <= 1'b0;
          busy_o <= 1'b0;
          done_o <= 1'b1;
          if (q_new > QW'(QMAX)) begin
            quot_o <= QW'(QMAX);
            sat_o  <= 1'b1;
          end else begin
            quot_o <= q_new;
          end
        end else begin
          bit_idx <= bit_idx - 1'b1;
        end
      end
    end
  end

endmodule
