// serpar: serial/parallel converter between the IO_W-bit server bus and the
// W-bit numbers of the processor.
//
// Deserializer: NW = ceil(W/IO_W) words, least significant first, are shifted
// into a register; after the last word p_valid rises and the value waits
// until p_ready.  Serializer: a value accepted on q_valid/q_ready is sent as
// NW words, least significant first, on m_valid/m_ready (upper bits of the
// last word are zero).  Both directions work independently, one word per
// cycle.  Word order and handshakes are this design's choice.
module serpar #(
  parameter int unsigned W    = 136,
  parameter int unsigned IO_W = 32,
  localparam int unsigned NW  = (W + IO_W - 1) / IO_W
) (
  input  logic            clk,
  input  logic            rst_n,
  // serial in -> parallel out
  input  logic            s_valid,
  output logic            s_ready,
  input  logic [IO_W-1:0] s_data,
  output logic            p_valid,
  input  logic            p_ready,
  output logic [W-1:0]    p_data,
  // parallel in -> serial out
  input  logic            q_valid,
  output logic            q_ready,
  input  logic [W-1:0]    q_data,
  output logic            m_valid,
  input  logic            m_ready,
  output logic [IO_W-1:0] m_data
);
  localparam int unsigned CW = $clog2(NW + 1);

  logic [NW*IO_W-1:0] din, dout;
  logic [CW-1:0]      icnt, ocnt;

  assign s_ready = !p_valid;
  assign p_data  = W'(din);
  assign q_ready = (ocnt == '0);
  assign m_valid = (ocnt != '0);
  assign m_data  = dout[IO_W-1:0];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      din     <= '0;
      icnt    <= '0;
      p_valid <= 1'b0;
      dout    <= '0;
      ocnt    <= '0;
    end else begin
      if (p_valid && p_ready) p_valid <= 1'b0;
      if (s_valid && s_ready) begin
        din <= {s_data, din[NW*IO_W-1:IO_W]};
        if (icnt == CW'(NW - 1)) begin
          icnt    <= '0;
          p_valid <= 1'b1;
        end else icnt <= icnt + 1'b1;
      end
      if (q_valid && q_ready) begin
        dout <= (NW*IO_W)'(q_data);
        ocnt <= CW'(NW);
      end else if (m_valid && m_ready) begin
        dout <= dout >> IO_W;
        ocnt <= ocnt - 1'b1;
      end
    end
  end
endmodule
