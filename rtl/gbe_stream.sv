// gbe_stream: payload of the Gigabit Ethernet data stream, one packet per
// processed bunch.
//
// Standard stream: the ten words Va, Vb, Vc, Vd, SUM, Q, X, Y, STATUS,
// COUNTER. Extended stream: the same ten words followed by the first
// raw_n raw samples of channel A, then of B, C and D (raw_n <= NSAMP_MAX =
// 150), read from the calculation ADC rate buffer. The stream is extended
// when the configured raw sample count is not zero. That count is latched
// at initialisation: automatically on the first clock after reset (boot) and
// again on every `init` pulse, so that the stream can be re-initialised
// during operation; a packet in flight finishes with its old count.
//
// `send` (ignored while busy) captures `result` and starts a packet. Words
// leave on a valid/ready stream (tdata, tvalid, tready, tlast on the final
// word); `busy` is high from `send` until the last word is accepted. Each
// value is one 32-bit word: amplitudes, STATUS and COUNTER zero-extended,
// raw samples sign-extended. A raw word costs two clocks to fetch (buffer
// read latency) before it is offered. The contents and the standard /
// extended selection follow the original design; the word format, the handshake
// and the channel-after-channel raw order are this design's choices. The
// Ethernet MAC and the SFP link that carry the words are outside this block.
module gbe_stream
  import sp_pkg::*;
#(
  parameter int unsigned NSAMP_MAX = 150,
  parameter int unsigned ADDR_W    = 10
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              init,
  input  logic [7:0]        cfg_raw_n,
  input  logic              send,
  input  sp_result_t        result,
  output logic              busy,
  output logic [ADDR_W-1:0] rd_addr,
  input  sample_vec_t       rd_data,
  output logic [31:0]       tdata,
  output logic              tvalid,
  input  logic              tready,
  output logic              tlast,
  output logic              extended   // the latched configuration is extended
);

  typedef enum logic [2:0] {S_IDLE, S_HDR, S_RD, S_WAIT, S_RAW} state_t;
  state_t            state;
  logic              booted;
  logic [7:0]        raw_n;       // latched configuration
  logic [7:0]        pkt_raw_n;   // count used by the packet in flight
  sp_result_t        res;
  logic [3:0]        hdr_idx;
  logic [1:0]        ch;
  logic [7:0]        smp;

  function automatic logic [31:0] hdr_word(input sp_result_t r, input logic [3:0] i);
    unique case (i)
      4'd0:    return 32'(r.va);
      4'd1:    return 32'(r.vb);
      4'd2:    return 32'(r.vc);
      4'd3:    return 32'(r.vd);
      4'd4:    return r.sum;
      4'd5:    return r.q;
      4'd6:    return r.x;
      4'd7:    return r.y;
      4'd8:    return 32'(r.status);
      default: return 32'(r.counter);
    endcase
  endfunction

  logic last_smp;
  assign last_smp = (smp == pkt_raw_n - 1'b1) && (ch == 2'd3);
  assign extended = (raw_n != '0);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state     <= S_IDLE;
      booted    <= 1'b0;
      raw_n     <= '0;
      pkt_raw_n <= '0;
      res       <= '0;
      hdr_idx   <= '0;
      ch        <= '0;
      smp       <= '0;
      rd_addr   <= '0;
      tdata     <= '0;
      tvalid    <= 1'b0;
      tlast     <= 1'b0;
    end else begin
      if (!booted || init) begin
        booted <= 1'b1;
        raw_n  <= (cfg_raw_n > 8'(NSAMP_MAX)) ? 8'(NSAMP_MAX) : cfg_raw_n;
      end
      unique case (state)
        S_IDLE: if (send && booted) begin
          res       <= result;
          pkt_raw_n <= raw_n;
          hdr_idx   <= '0;
          tdata     <= hdr_word(result, 4'd0);
          tvalid    <= 1'b1;
          tlast     <= 1'b0;
          state     <= S_HDR;
        end
        S_HDR: if (tready) begin
          if (hdr_idx == 4'(RESULT_WORDS - 1)) begin
            tvalid <= 1'b0;
            tlast  <= 1'b0;
            if (pkt_raw_n == '0) begin
              state <= S_IDLE;
            end else begin
              ch      <= '0;
              smp     <= '0;
              rd_addr <= '0;
              state   <= S_RD;
            end
          end else begin
            hdr_idx <= hdr_idx + 1'b1;
            tdata   <= hdr_word(res, hdr_idx + 1'b1);
            tlast   <= (hdr_idx + 1'b1 == 4'(RESULT_WORDS - 1)) && (pkt_raw_n == '0);
          end
        end
        S_RD:   state <= S_WAIT;   // address presented to the buffer
        S_WAIT: begin              // read data available
          tdata  <= 32'(signed'(rd_data[ch]));
          tvalid <= 1'b1;
          tlast  <= last_smp;
          state  <= S_RAW;
        end
        S_RAW: if (tready) begin
          tvalid <= 1'b0;
          tlast  <= 1'b0;
          if (last_smp) begin
            state <= S_IDLE;
          end else begin
            if (smp == pkt_raw_n - 1'b1) begin
              smp     <= '0;
              ch      <= ch + 1'b1;
              rd_addr <= '0;
            end else begin
              smp     <= smp + 1'b1;
              rd_addr <= rd_addr + 1'b1;
            end
            state <= S_RD;
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  assign busy = (state != S_IDLE);

  // Stream rule: a word offered stays offered, unchanged, until taken.
  a_hold: assert property (@(posedge clk) disable iff (!rst_n)
    tvalid && !tready |=> tvalid && $stable(tdata) && $stable(tlast));

endmodule
