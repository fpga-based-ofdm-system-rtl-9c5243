// p2s: parallel to serial converter, least significant bit first.
//
// A word accepted on s_data is loaded into a shift register. Every cycle in
// which the serial side accepts a bit, bit 0 of the register is the output
// and the register is shifted right by one place, so the word leaves LSB
// first, one bit per cycle. A counter marks the end of the word; the next
// word may be loaded in the same cycle as the last bit leaves, so words
// follow each other without a gap. While a word is being sent s_ready is low.
// Timing: the first bit is valid in the cycle after the load; a word of N
// bits takes N cycles when m_ready stays high.
// LSB-first shifting follows the source; the handshake is this design's own.
// Synchronous active-high reset.
module p2s #(
  parameter int unsigned N = 256
) (
  input  logic         clk,
  input  logic         rst,
  input  logic         s_valid,
  output logic         s_ready,
  input  logic [N-1:0] s_data,
  output logic         m_valid,
  input  logic         m_ready,
  output logic         m_bit
);

  localparam int unsigned CW = $clog2(N);

  logic [N-1:0]  shift_reg;
  logic [CW-1:0] count;
  logic          busy, last, send;

  assign m_valid = busy;
  assign m_bit   = shift_reg[0];
  assign send    = busy && m_ready;
  assign last    = (count == CW'(N - 1));
  assign s_ready = !busy || (send && last);

  always_ff @(posedge clk) begin
    if (rst) begin
      shift_reg <= '0;
      count     <= '0;
      busy      <= 1'b0;
    end else if (s_valid && s_ready) begin
      shift_reg <= s_data;
      count     <= '0;
      busy      <= 1'b1;
    end else if (send) begin
      shift_reg <= shift_reg >> 1;
      count     <= count + 1'b1;
      if (last) busy <= 1'b0;
    end
  end

  a_hold: assert property (@(posedge clk) disable iff (rst)
                           m_valid && !m_ready |=> m_valid && $stable(m_bit));

endmodule
