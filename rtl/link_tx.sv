// link_tx: link framer of one serial link (NIC or switch port).
//
// Sends one 8-bit symbol per clock (tx_data, tx_k = control symbol) towards
// the transceiver. A frame is: start-of-packet symbol, zero to MAX_CREDITS
// 16-bit credits, the 64-bit packet header, a CRC-16 over the header, the
// payload, a CRC-32 over the payload; at least one comma symbol separates
// frames. Bytes go most significant first. This frame layout is the
// platform's; the byte-wide symbol interface, the CRC polynomials (see
// ipc_pkg) and the credit-only frame (sop, credits, comma) that lets credits
// flow while no packet is waiting are this design's choices.
//
// Packet input: a word stream (in_valid/in_ready/in_data/in_last). The first
// 64/DATA_W words are the header, the following words are the payload, and
// in_last marks the final word. The source must hold a whole packet before
// it raises in_valid (the NIC's link FIFO and the switch crosspoints store
// whole packets), since a frame cannot pause once started.
// Credit input: cr_valid/cr_ready/cr_data, one credit per handshake; credits
// are taken only right after the sop, i.e. on packet boundaries.
module link_tx
  import ipc_pkg::*;
#(
  parameter int DATA_W      = 64,
  parameter int MAX_CREDITS = 4
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              in_valid,
  input  logic [DATA_W-1:0] in_data,
  input  logic              in_last,
  output logic              in_ready,
  input  logic              cr_valid,
  input  logic [15:0]       cr_data,
  output logic              cr_ready,
  output logic [7:0]        tx_data,
  output logic              tx_k,
  output logic              pkt_done,    // pulse: last CRC byte of a packet sent
  output logic              credit_sent  // pulse: a credit taken into a frame
);
  localparam int BPW = DATA_W / 8;

  typedef enum logic [2:0] {S_IDLE, S_SOP, S_CRED, S_HDR, S_HCRC, S_PAY, S_PCRC} state_t;

  state_t             state;
  logic [DATA_W-1:0]  cur;        // rest of the current word, next byte on top
  logic [$clog2(BPW+1)-1:0] bleft; // bytes left in cur
  logic               cur_last;
  logic               has_pkt;
  logic [3:0]         cnt;        // byte counter inside a field
  logic [$clog2(MAX_CREDITS+1)-1:0] ncred;
  logic [15:0]        cred;
  logic [15:0]        crc16;
  logic [31:0]        crc32;

  // Byte stream from the packet words.
  logic       need_word;
  logic [7:0] stream_byte;
  logic       take_byte;
  logic [7:0] nx_data;
  logic       nx_k;

  assign need_word   = (bleft == '0);
  assign stream_byte = need_word ? in_data[DATA_W-1 -: 8] : cur[DATA_W-1 -: 8];

  always_comb begin
    take_byte = 1'b0;
    cr_ready  = 1'b0;
    nx_data   = K_COMMA;
    nx_k      = 1'b1;
    unique case (state)
      S_IDLE: begin nx_data = K_COMMA; nx_k = 1'b1; end
      S_SOP:  begin nx_data = K_SOP;   nx_k = 1'b1; end
      S_CRED: begin nx_data = cnt[0] ? cred[7:0] : cred[15:8]; nx_k = 1'b0; end
      S_HDR, S_PAY: begin nx_data = stream_byte; nx_k = 1'b0; take_byte = 1'b1; end
      S_HCRC: begin nx_data = cnt[0] ? crc16[7:0] : crc16[15:8]; nx_k = 1'b0; end
      S_PCRC: begin nx_data = crc32[31 - 8*cnt[1:0] -: 8]; nx_k = 1'b0; end
      default: ;
    endcase
    // A credit is accepted at the end of the sop byte or of a previous credit.
    if ((state == S_SOP || (state == S_CRED && cnt[0])) &&
        ncred < MAX_CREDITS[$bits(ncred)-1:0])
      cr_ready = cr_valid;
  end

  assign in_ready = take_byte && need_word;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state       <= S_IDLE;
      cur         <= '0;
      bleft       <= '0;
      cur_last    <= 1'b0;
      has_pkt     <= 1'b0;
      cnt         <= '0;
      ncred       <= '0;
      cred        <= '0;
      crc16       <= 16'hFFFF;
      crc32       <= 32'hFFFFFFFF;
      tx_data     <= K_COMMA;
      tx_k        <= 1'b1;
      pkt_done    <= 1'b0;
      credit_sent <= 1'b0;
    end else begin
      tx_data     <= nx_data;
      tx_k        <= nx_k;
      pkt_done    <= 1'b0;
      credit_sent <= cr_ready;
      if (cr_ready) cred <= cr_data;

      if (take_byte) begin
        if (need_word) begin
          cur      <= in_data << 8;
          bleft    <= ($bits(bleft))'(BPW - 1);
          cur_last <= in_last;
        end else begin
          cur   <= cur << 8;
          bleft <= bleft - 1'b1;
        end
      end

      unique case (state)
        S_IDLE: begin
          ncred <= '0;
          if (in_valid || cr_valid) begin
            state   <= S_SOP;
            has_pkt <= in_valid;
          end
        end
        S_SOP: begin
          cnt   <= '0;
          crc16 <= 16'hFFFF;
          crc32 <= 32'hFFFFFFFF;
          if (cr_ready) begin
            state <= S_CRED;
            ncred <= ncred + 1'b1;
          end else if (has_pkt) state <= S_HDR;
          else                  state <= S_IDLE;
        end
        S_CRED: begin
          if (!cnt[0]) cnt <= 4'd1;
          else begin
            cnt <= '0;
            if (cr_ready)     ncred <= ncred + 1'b1;
            else if (has_pkt) state <= S_HDR;
            else              state <= S_IDLE;
          end
        end
        S_HDR: begin
          crc16 <= crc16_byte(crc16, nx_data);
          if (cnt == 4'd7) begin
            cnt   <= '0;
            state <= S_HCRC;
          end else cnt <= cnt + 1'b1;
        end
        S_HCRC: begin
          if (cnt[0]) begin
            cnt <= '0;
            // Header-only packet: the last header word carried in_last.
            state <= (cur_last && bleft == '0) ? S_PCRC : S_PAY;
          end else cnt <= 4'd1;
        end
        S_PAY: begin
          crc32 <= crc32_byte(crc32, nx_data);
          if ((need_word ? (BPW == 1 && in_last) : (bleft == 1 && cur_last))) begin
            state <= S_PCRC;
            cnt   <= '0;
          end
        end
        S_PCRC: begin
          if (cnt == 4'd3) begin
            cnt      <= '0;
            state    <= S_IDLE;
            pkt_done <= 1'b1;
          end else cnt <= cnt + 1'b1;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  // Whole packets are buffered upstream: data never runs dry inside a frame.
  assert property (@(posedge clk) disable iff (!rst_n)
                   (take_byte && need_word) |-> in_valid)
    else $error("link_tx: packet data underrun");
endmodule
