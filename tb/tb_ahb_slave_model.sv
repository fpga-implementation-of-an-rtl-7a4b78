// tb_ahb_slave_model: behavioural AHB arbiter and system memory for testbenches.
//
// Stands in for the bus arbiter and the DDR2 memory that hold the integral
// images. It grants the bus to the single master after a random delay of 0-3
// cycles while hbusreq is high, answers each read with 1 to MAX_WAIT+1 random wait
// states and returns the word of tb_vj_ref_pkg::mem_word. Addresses outside
// the images get the two-cycle ERROR response. Counters report how many wait
// states, grant delays and errors occurred. Not synthesizable.
module tb_ahb_slave_model #(
  parameter int MAX_WAIT = 3
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        hbusreq,
  output logic        hgrant,
  output logic        hready,
  output logic [1:0]  hresp,
  output logic [31:0] hrdata,
  input  logic [31:0] haddr,
  input  logic [1:0]  htrans,
  input  logic        hwrite
);
  import tb_vj_ref_pkg::*;

  int n_waits = 0, n_grant_delays = 0, n_errors = 0, n_reads = 0;

  int gdelay = 0;
  int waits = 0;
  bit in_data = 0, err_phase = 0;
  logic [31:0] a_q;

  always @(posedge clk) begin
    if (!rst_n) begin
      hgrant <= 0; gdelay <= 0;
    end else if (!hbusreq) begin
      hgrant <= 0;
      gdelay <= $urandom % 4;
    end else if (gdelay > 0) begin
      gdelay <= gdelay - 1;
      n_grant_delays++;
    end else begin
      hgrant <= 1;
    end
  end

  always @(posedge clk) begin
    if (!rst_n) begin
      hready <= 1; hresp <= 2'b00; in_data <= 0; err_phase <= 0; hrdata <= 0;
    end else begin
      if (err_phase) begin
        // second cycle of the ERROR response
        hready <= 1; hresp <= 2'b01; err_phase <= 0; in_data <= 0;
      end else if (in_data && waits > 0) begin
        waits <= waits - 1; n_waits++;
      end else if (in_data) begin
        automatic bit ok;
        automatic logic [31:0] d = mem_word(a_q, ok);
        if (ok) begin
          hready <= 1; hresp <= 2'b00; hrdata <= d; in_data <= 0; n_reads++;
        end else begin
          hready <= 0; hresp <= 2'b01; err_phase <= 1; n_errors++;
        end
      end else begin
        hresp <= 2'b00;
        hready <= 1;
      end
      // address phase accepted at this edge
      if (hready && htrans[1] && hgrant && !in_data && !err_phase) begin
        a_q <= haddr;
        in_data <= 1;
        waits <= $urandom % (MAX_WAIT + 1);
        hready <= 0;
        if (hwrite) $display("unexpected write");
      end
    end
  end
endmodule
