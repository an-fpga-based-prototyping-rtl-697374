// nic_csr: memory-mapped target space of the NIC (control registers, DMA
// request queue window, performance and debug counters).
//
// Address map (byte addresses of 64-bit registers, tgt_addr[15:0]):
//   0x0000-0x3FFF  DMA request queues, write only: queue = addr[13:11],
//                  slot = addr[10:4], descriptor word = addr[3]
//   0x4000         local notification base address (read/write)
//   0x4008         remote notification address (read/write)
//   0x4010         node number, bits 2:0 (read/write)
//   0x4100 + 8*i   event counter i, 32 bits, read only (see ev)
//   0x4200 + 8*q   consumed-descriptor pointer of request queue q, read only
// Writes take effect on the next clock; reads return tgt_rd_data one clock
// after tgt_rd_en. Each ev[i] pulse adds one to counter i.
// The existence of a memory-mapped queue window, control registers and
// performance/debug counters follows the platform; the map and the counter
// set are this design's choices.
module nic_csr #(
  parameter int NEV = 12,
  parameter int NQ  = 8
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  tgt_wr_en,
  input  logic [15:0]           tgt_addr,
  input  logic [63:0]           tgt_wdata,
  input  logic                  tgt_rd_en,
  input  logic [15:0]           tgt_rd_addr,
  output logic [63:0]           tgt_rd_data,
  output logic                  desc_wr_en,
  output logic [2:0]            desc_q,
  output logic [6:0]            desc_slot,
  output logic                  desc_word,
  output logic [63:0]           desc_data,
  output logic [63:0]           local_notify_base,
  output logic [63:0]           remote_notify_addr,
  output logic [2:0]            node_id,
  input  logic [NEV-1:0]        ev,
  input  logic [7:0]            q_head_ptr [NQ]
);
  logic [31:0] cnt [NEV];

  assign desc_wr_en = tgt_wr_en && (tgt_addr[15:14] == 2'b00);
  assign desc_q     = tgt_addr[13:11];
  assign desc_slot  = tgt_addr[10:4];
  assign desc_word  = tgt_addr[3];
  assign desc_data  = tgt_wdata;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      local_notify_base  <= '0;
      remote_notify_addr <= '0;
      node_id            <= '0;
      tgt_rd_data        <= '0;
      for (int i = 0; i < NEV; i++) cnt[i] <= '0;
    end else begin
      for (int i = 0; i < NEV; i++) if (ev[i]) cnt[i] <= cnt[i] + 1'b1;
      if (tgt_wr_en) begin
        unique case (tgt_addr)
          16'h4000: local_notify_base  <= tgt_wdata;
          16'h4008: remote_notify_addr <= tgt_wdata;
          16'h4010: node_id            <= tgt_wdata[2:0];
          default: ;
        endcase
      end
      if (tgt_rd_en) begin
        tgt_rd_data <= '0;
        if (tgt_rd_addr == 16'h4000) tgt_rd_data <= local_notify_base;
        else if (tgt_rd_addr == 16'h4008) tgt_rd_data <= remote_notify_addr;
        else if (tgt_rd_addr == 16'h4010) tgt_rd_data <= {61'd0, node_id};
        else if (tgt_rd_addr[15:8] == 8'h41 && 32'(tgt_rd_addr[7:3]) < NEV)
          tgt_rd_data <= {32'd0, cnt[tgt_rd_addr[7:3]]};
        else if (tgt_rd_addr[15:8] == 8'h42 && 32'(tgt_rd_addr[7:3]) < NQ)
          tgt_rd_data <= {56'd0, q_head_ptr[tgt_rd_addr[7:3]]};
      end
    end
  end
endmodule
