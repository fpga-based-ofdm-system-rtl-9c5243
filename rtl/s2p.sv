// s2p: serial to parallel converter.
//
// Bits arrive one per accepted cycle on s_bit and are shifted into a
// temporary register (temp, N-1 bits) from the top, so the first bit received ends up
// in bit 0. A counter tracks the bits collected; after N bits the word is
// copied to the output register and offered on m_data with m_valid. While
// the output register is still full, temp keeps collecting the next word;
// only the bit that would complete it is refused (s_ready low), which is how
// a slower consumer stalls the serial input.
// Timing: m_valid rises in the cycle after the N-th bit is accepted; with
// s_valid and m_ready held high one word leaves every N cycles.
// The temp register, the counter and the transfer after N cycles follow the
// source; the valid/ready handshake and the LSB-first order are this design's
// own choices. Synchronous active-high reset.
module s2p #(
  parameter int unsigned N = 32
) (
  input  logic         clk,
  input  logic         rst,
  input  logic         s_valid,
  output logic         s_ready,
  input  logic         s_bit,
  output logic         m_valid,
  input  logic         m_ready,
  output logic [N-1:0] m_data
);

  localparam int unsigned CW = $clog2(N);

  logic [N-2:0]  temp;
  logic [N-1:0]  temp_next;
  logic [CW-1:0] count;
  logic          last, take;

  assign last      = (count == CW'(N - 1));
  assign s_ready   = !last || !m_valid || m_ready;
  assign take      = s_valid && s_ready;
  assign temp_next = {s_bit, temp};

  always_ff @(posedge clk) begin
    if (rst) begin
      temp    <= '0;
      count   <= '0;
      m_valid <= 1'b0;
      m_data  <= '0;
    end else begin
      if (m_valid && m_ready) m_valid <= 1'b0;
      if (take) begin
        temp  <= temp_next[N-1:1];
        count <= last ? '0 : count + 1'b1;
        if (last) begin
          m_data  <= temp_next;
          m_valid <= 1'b1;
        end
      end
    end
  end

  a_hold: assert property (@(posedge clk) disable iff (rst)
                           m_valid && !m_ready |=> m_valid && $stable(m_data));

endmodule
