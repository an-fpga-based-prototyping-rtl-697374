// link_rx: link deframer of one serial link (NIC or switch port).
//
// Takes one 8-bit symbol per clock (rx_data, rx_k = control symbol) from the
// transceiver and parses the frames built by link_tx: sop, zero or more
// 16-bit credits, 64-bit header, CRC-16, payload of header.size 32-bit words,
// CRC-32, then comma. Credits with good parity leave on cr_valid/cr_data.
// A packet whose header CRC fails is dropped whole and counted on
// hdr_crc_err. Packets with a good header leave as a word stream on
// out_valid/out_data/out_last (header words first, then the payload), with no
// back-pressure: credits guarantee room downstream. The last word is held
// back until the CRC-32 has been checked, so out_err, valid with out_last,
// tells whether the payload arrived intact. A control symbol inside a frame
// ends the packet early with out_last and out_err set.
// out_hdr holds the header of the packet being delivered.
// Frame layout follows the platform; the symbol interface, the CRC
// polynomials and the error handling are this design's choices.
// DATA_W may be 32 (switch) or 64 (NIC).
module link_rx
  import ipc_pkg::*;
#(
  parameter int DATA_W = 64
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic [7:0]        rx_data,
  input  logic              rx_k,
  output logic              out_valid,
  output logic [DATA_W-1:0] out_data,
  output logic              out_last,
  output logic              out_err,
  output pkt_hdr_t          out_hdr,
  output logic              cr_valid,
  output logic [15:0]       cr_data,
  output logic              hdr_crc_err,
  output logic              cr_parity_err
);
  localparam int BPW = DATA_W / 8;

  typedef enum logic [2:0] {R_IDLE, R_CH0, R_CR1, R_HDR, R_HCRC, R_PAY, R_PCRC} state_t;

  state_t            state;
  logic [63:0]       hsh;       // header shift register
  logic [7:0]        cbyte;     // first credit byte
  logic [3:0]        cnt;
  logic [15:0]       crc16;
  logic [31:0]       crc32;
  logic [15:0]       rcrc16;
  logic [31:0]       rcrc32;
  logic [DATA_W-1:0] acc;       // payload word being assembled
  logic [$clog2(BPW)-1:0] bidx;
  logic [11:0]       bytes_left;
  logic [DATA_W-1:0] hold;
  logic              hold_v;
  logic [15:0]       cword;
  pkt_hdr_t          hdr_next;

  assign cword    = {cbyte, rx_data};
  assign hdr_next = pkt_hdr_t'(hsh);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state         <= R_IDLE;
      hsh           <= '0;
      cbyte         <= '0;
      cnt           <= '0;
      crc16         <= 16'hFFFF;
      crc32         <= 32'hFFFFFFFF;
      rcrc16        <= '0;
      rcrc32        <= '0;
      acc           <= '0;
      bidx          <= '0;
      bytes_left    <= '0;
      hold          <= '0;
      hold_v        <= 1'b0;
      out_valid     <= 1'b0;
      out_data      <= '0;
      out_last      <= 1'b0;
      out_err       <= 1'b0;
      out_hdr       <= '0;
      cr_valid      <= 1'b0;
      cr_data       <= '0;
      hdr_crc_err   <= 1'b0;
      cr_parity_err <= 1'b0;
    end else begin
      out_valid     <= 1'b0;
      out_last      <= 1'b0;
      out_err       <= 1'b0;
      cr_valid      <= 1'b0;
      hdr_crc_err   <= 1'b0;
      cr_parity_err <= 1'b0;

      // A control symbol inside a packet aborts it.
      if (rx_k && (state == R_PAY || state == R_PCRC)) begin
        out_valid <= 1'b1;
        out_data  <= hold;
        out_last  <= 1'b1;
        out_err   <= 1'b1;
        hold_v    <= 1'b0;
        state     <= (rx_data == K_SOP) ? R_CH0 : R_IDLE;
      end else if (rx_k && (state == R_CR1 || state == R_HDR || state == R_HCRC)) begin
        state <= (rx_data == K_SOP) ? R_CH0 : R_IDLE;
      end else begin
        unique case (state)
          R_IDLE: if (rx_k && rx_data == K_SOP) state <= R_CH0;
          R_CH0: begin
            crc16 <= 16'hFFFF;
            crc32 <= 32'hFFFFFFFF;
            if (rx_k) state <= (rx_data == K_SOP) ? R_CH0 : R_IDLE;
            else if (rx_data[7]) begin
              cbyte <= rx_data;
              state <= R_CR1;
            end else begin
              hsh   <= {56'd0, rx_data};
              crc16 <= crc16_byte(16'hFFFF, rx_data);
              cnt   <= 4'd1;
              state <= R_HDR;
            end
          end
          R_CR1: begin
            if (^cword) cr_parity_err <= 1'b1;
            else begin
              cr_valid <= 1'b1;
              cr_data  <= cword;
            end
            state <= R_CH0;
          end
          R_HDR: begin
            hsh   <= {hsh[55:0], rx_data};
            crc16 <= crc16_byte(crc16, rx_data);
            if (cnt == 4'd7) begin
              cnt   <= '0;
              state <= R_HCRC;
            end else cnt <= cnt + 1'b1;
          end
          R_HCRC: begin
            if (cnt == 4'd0) begin
              rcrc16[15:8] <= rx_data;
              cnt          <= 4'd1;
            end else begin
              cnt <= '0;
              if ({rcrc16[15:8], rx_data} != crc16) begin
                hdr_crc_err <= 1'b1;
                state       <= R_IDLE;
              end else begin
                out_hdr    <= hdr_next;
                bytes_left <= {hdr_next.size, 2'b00};
                bidx       <= '0;
                if (DATA_W == 64) begin
                  hold   <= DATA_W'(hsh);
                  hold_v <= 1'b1;
                end else begin
                  out_valid <= 1'b1;
                  out_data  <= DATA_W'(hsh[63:32]);
                  hold      <= DATA_W'(hsh[31:0]);
                  hold_v    <= 1'b1;
                end
                state <= (hdr_next.size == '0) ? R_PCRC : R_PAY;
              end
            end
          end
          R_PAY: begin
            crc32      <= crc32_byte(crc32, rx_data);
            acc        <= {acc[DATA_W-9:0], rx_data};
            bytes_left <= bytes_left - 1'b1;
            if (bidx == ($bits(bidx))'(BPW - 1)) begin
              bidx      <= '0;
              out_valid <= hold_v;
              out_data  <= hold;
              hold      <= {acc[DATA_W-9:0], rx_data};
              hold_v    <= 1'b1;
            end else bidx <= bidx + 1'b1;
            if (bytes_left == 12'd1) state <= R_PCRC;
          end
          R_PCRC: begin
            rcrc32 <= {rcrc32[23:0], rx_data};
            if (cnt == 4'd3) begin
              cnt       <= '0;
              out_valid <= 1'b1;
              out_data  <= hold;
              out_last  <= 1'b1;
              out_err   <= ({rcrc32[23:0], rx_data} != crc32) || (bidx != '0);
              hold_v    <= 1'b0;
              state     <= R_IDLE;
            end else cnt <= cnt + 1'b1;
          end
          default: state <= R_IDLE;
        endcase
      end
    end
  end
endmodule
