// tb_host_mem: behavioural model of a host PC's memory as seen through the
// NIC's DMA port (stands for the PCI-X bus, bridge and DRAM of the host).
// A request (req_valid/req_ready) carries write enable, byte address and a
// length in 64-bit words. Writes then take that many words on w*; reads
// return them on r* in order, one per clock while rready is high, after
// READ_LAT idle clocks (a stand-in for the split-completion latency).
// Memory is 2**AW words; addresses wrap. Testbenches reach mem[] and the
// counters hierarchically.
module tb_host_mem #(
  parameter int AW       = 16,
  parameter int READ_LAT = 4
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        req_valid,
  output logic        req_ready,
  input  logic        req_we,
  input  logic [63:0] req_addr,
  input  logic [9:0]  req_len,
  input  logic        wvalid,
  input  logic [63:0] wdata,
  input  logic        wlast,
  output logic        wready,
  output logic        rvalid,
  output logic [63:0] rdata,
  input  logic        rready
);
  logic [63:0] mem [2**AW];
  typedef enum logic [1:0] {IDLE, WR, RDW, RD} st_t;
  st_t         st;
  logic [AW-1:0] a;
  logic [9:0]  n;
  logic [3:0]  lat;
  int          writes, reads;

  assign req_ready = (st == IDLE);
  assign wready    = (st == WR);
  assign rvalid    = (st == RD);
  assign rdata     = mem[a];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st <= IDLE; a <= '0; n <= '0; lat <= '0; writes <= 0; reads <= 0;
    end else begin
      case (st)
        IDLE: if (req_valid) begin
          a   <= AW'(req_addr >> 3);
          n   <= req_len;
          lat <= 4'(READ_LAT);
          st  <= req_we ? WR : RDW;
        end
        WR: if (wvalid) begin
          mem[a] <= wdata;
          a      <= a + 1'b1;
          writes <= writes + 1;
          if (wlast) st <= IDLE;
        end
        RDW: if (lat == 0) st <= RD; else lat <= lat - 1'b1;
        RD: if (rready) begin
          a     <= a + 1'b1;
          n     <= n - 1'b1;
          reads <= reads + 1;
          if (n == 10'd1) st <= IDLE;
        end
        default: st <= IDLE;
      endcase
    end
  end
endmodule
