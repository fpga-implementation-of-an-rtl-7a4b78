// ahb_master_if: simple DMA master on the AMBA 2.0 AHB bus.
//
// The stage evaluator reads the integral images, which lie in system memory,
// through this master. Each request is one 32-bit single read: the master
// raises hbusreq, waits until the arbiter grants the bus (hgrant with hready),
// drives a NONSEQ address phase, and waits in the data phase until the slave
// raises hready. The word is then returned with rsp_valid for one cycle;
// an ERROR response sets rsp_err with it. Wait states on the bus stretch the
// transfer as long as the slave needs, which is why the evaluator handshakes
// with this block instead of assuming a fixed latency.
// That the IP has a simple DMA AHB master is the design's; single non-burst
// word reads are this implementation's choice. HPROT marks data accesses.
// Because the master only reads, hwrite, hsize, hburst, hprot and hwdata are
// constants. They stay as ports so that the block has a complete AHB master
// port to connect to a bus.
//
// Request side: req is accepted when req_ready is high (one request in
// flight at a time); addr must be word aligned.
module ahb_master_if (
  input  logic        clk,
  input  logic        rst_n,
  // request side
  input  logic        req,
  input  logic [31:0] addr,
  output logic        req_ready,
  output logic        rsp_valid,
  output logic [31:0] rsp_data,
  output logic        rsp_err,
  // AHB master
  output logic        hbusreq,
  input  logic        hgrant,
  input  logic        hready,
  input  logic [1:0]  hresp,
  input  logic [31:0] hrdata,
  output logic [31:0] haddr,
  output logic [1:0]  htrans,
  output logic        hwrite,
  output logic [2:0]  hsize,
  output logic [2:0]  hburst,
  output logic [3:0]  hprot,
  output logic [31:0] hwdata
);

  typedef enum logic [1:0] {M_IDLE, M_BUSREQ, M_ADDR, M_DATA} mst_state_e;
  mst_state_e state;

  localparam logic [1:0] HTRANS_IDLE   = 2'b00;
  localparam logic [1:0] HTRANS_NONSEQ = 2'b10;
  localparam logic [1:0] HRESP_OKAY    = 2'b00;

  logic [31:0] addr_q;

  assign req_ready = (state == M_IDLE);
  assign hbusreq   = (state == M_BUSREQ) || (state == M_ADDR);
  assign htrans    = (state == M_ADDR) ? HTRANS_NONSEQ : HTRANS_IDLE;
  assign haddr     = addr_q;
  assign hwrite    = 1'b0;
  assign hsize     = 3'b010;     // word
  assign hburst    = 3'b000;     // single
  assign hprot     = 4'b0011;    // data, privileged
  assign hwdata    = '0;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state     <= M_IDLE;
      addr_q    <= '0;
      rsp_valid <= 1'b0;
      rsp_err   <= 1'b0;
      rsp_data  <= '0;
    end else begin
      rsp_valid <= 1'b0;
      unique case (state)
        M_IDLE: if (req) begin
          addr_q <= addr;
          state  <= M_BUSREQ;
        end
        // bus ownership moves to this master after hgrant is seen with hready
        M_BUSREQ: if (hgrant && hready) state <= M_ADDR;
        // address phase: accepted when hready is high
        M_ADDR: if (hready) state <= M_DATA;
        // data phase
        M_DATA: if (hready) begin
          rsp_valid <= 1'b1;
          rsp_data  <= hrdata;
          rsp_err   <= (hresp != HRESP_OKAY);
          state     <= M_IDLE;
        end
        default: state <= M_IDLE;
      endcase
    end
  end

  // A new request is only taken when idle.
  a_req_aligned: assert property (@(posedge clk) disable iff (!rst_n)
                                  (req && req_ready) |-> (addr[1:0] == 2'b00));
  // The address stays stable while the transfer is pending.
  a_addr_stable: assert property (@(posedge clk) disable iff (!rst_n)
                                  (state == M_ADDR && !hready) |=> (htrans == HTRANS_NONSEQ && $stable(haddr)));

endmodule
