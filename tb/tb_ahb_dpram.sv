// tb_ahb_dpram: checks the shared memory through its AHB slave port and its
// internal read port.
//
// A pipelined AHB master drives random back-to-back byte, halfword and word
// writes and reads over the whole 64 KB; a byte array in the testbench is the
// reference (big-endian byte lanes). Every read must return the reference
// word's bytes, reads must insert exactly one wait state and writes none.
// Then the internal port B reads random words, one per clock, with one clock
// of latency.
module tb_ahb_dpram;
  logic clk = 0, rst_n = 0;
  logic hsel = 0, hwrite = 0, hready_out;
  logic [31:0] haddr = 0, hwdata = 0, hrdata;
  logic [1:0] htrans = 0, hresp;
  logic [2:0] hsize = 0;
  logic b_en = 0;
  logic [13:0] b_addr = 0;
  logic [31:0] b_rdata;
  int checks = 0, failures = 0;

  ahb_dpram dut (.clk, .rst_n, .hsel, .haddr, .htrans, .hwrite, .hsize, .hready_in(hready_out),
                 .hwdata, .hrdata, .hready_out, .hresp, .b_en, .b_addr, .b_rdata);
  always #5 clk = ~clk;

  byte unsigned ref_mem [65536];

  typedef struct { bit valid; bit wr; logic [31:0] a; logic [2:0] sz; logic [31:0] d; } op_t;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [31:0] ref_word(logic [31:0] a);
    logic [31:0] w = {a[31:2], 2'b00};
    return {ref_mem[w[15:0]], ref_mem[w[15:0]+1], ref_mem[w[15:0]+2], ref_mem[w[15:0]+3]};
  endfunction

  function automatic bit lane_on(logic [2:0] sz, logic [1:0] off, int byte_i);
    // byte_i: 0 = bits 31:24 (address offset 0)
    case (sz)
      3'b000:  return byte_i == off;
      3'b001:  return (byte_i >> 1) == (off >> 1);
      default: return 1;
    endcase
  endfunction

  op_t prev;
  int cycles, n_ops;

  task automatic run_ops(op_t ops[$]);
    prev = '{valid: 0, wr: 0, a: 0, sz: 0, d: 0};
    for (int i = 0; i <= ops.size(); i++) begin
      automatic op_t cur = (i < ops.size()) ? ops[i] : '{valid: 0, wr: 0, a: 0, sz: 0, d: 0};
      automatic bit r;
      automatic logic [31:0] rd;
      automatic int stall = 0;
      hsel   <= cur.valid;
      htrans <= cur.valid ? 2'b10 : 2'b00;
      haddr  <= cur.a;
      hwrite <= cur.wr;
      hsize  <= cur.sz;
      hwdata <= prev.d;
      do begin
        @(negedge clk);
        r = hready_out;
        rd = hrdata;
        if (!r) stall++;
        @(posedge clk);
      end while (!r);
      if (prev.valid) begin
        checks++;
        if (stall != (prev.wr ? 0 : 1)) begin failures++; $display("wait states %0d", stall); end
        if (prev.wr) begin
          for (int b = 0; b < 4; b++)
            if (lane_on(prev.sz, prev.a[1:0], b))
              ref_mem[{prev.a[15:2], 2'(b)}] = prev.d[31 - 8*b -: 8];
        end else begin
          checks++;
          if (rd !== ref_word(prev.a)) begin
            failures++; $display("read %h: %h expected %h", prev.a, rd, ref_word(prev.a));
          end
        end
      end
      prev = cur;
    end
  endtask

  initial begin
    op_t ops[$];
    for (int i = 0; i < 65536; i++) ref_mem[i] = 0;
    repeat (3) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    // clear the whole memory with word writes
    for (int i = 0; i < 16384; i++) ops.push_back('{valid: 1, wr: 1, a: 32'hA000_0000 + 4*i, sz: 3'b010, d: 0});
    run_ops(ops);
    ops.delete();
    for (int n = 0; n < 3000; n++) begin
      automatic logic [31:0] a = 32'hA000_0000 + ($urandom % 256) * 4 + (($urandom % 4) << 14);
      automatic logic [2:0] sz = 3'($urandom % 3);
      automatic bit wr = $urandom % 2;
      if (sz == 3'b001) a[1:0] = {a[1], 1'b0} | (2'($urandom % 2) << 1);
      else if (sz == 3'b000) a[1:0] = 2'($urandom % 4);
      else a[1:0] = 0;
      if (!wr) begin sz = 3'b010; a[1:0] = 0; end
      ops.push_back('{valid: ($urandom % 8 != 0), wr: wr, a: a, sz: sz, d: $urandom});
    end
    run_ops(ops);
    // port B
    for (int n = 0; n < 500; n++) begin
      automatic logic [13:0] ba = 14'($urandom);
      automatic logic [31:0] e = ref_word({16'd0, ba, 2'b00});
      b_en <= 1; b_addr <= ba;
      @(posedge clk);
      b_en <= 0;
      @(negedge clk);
      checks++;
      if (b_rdata !== e) begin failures++; $display("port B %0d: %h expected %h", ba, b_rdata, e); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
