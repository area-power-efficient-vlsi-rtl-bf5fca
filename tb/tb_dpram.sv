// tb_dpram: random reads and writes on both ports of the 45-word RAM are
// compared with an array model kept here. Both ports are exercised in the
// same cycle (never writing the same address twice in one cycle); read data
// is checked one cycle after the read, and must hold while the port idles.
module tb_dpram;
  import pinv_pkg::*;

  localparam int DEPTH = 45;
  localparam int AB = $clog2(DEPTH);

  logic clk = 1'b0;
  logic a_en = 1'b0, a_we = 1'b0, b_en = 1'b0, b_we = 1'b0;
  logic [AB-1:0] a_addr = '0, b_addr = '0;
  cplx_t a_wdata = '0, b_wdata = '0, a_rdata, b_rdata;
  cplx_t model [DEPTH];
  int checks = 0, failures = 0;

  dpram #(.DEPTH(DEPTH)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    cplx_t ea, eb;
    logic ra, rb;
    logic seen_a, seen_b;  // a port has read at least once
    seen_a = 1'b0;
    seen_b = 1'b0;
    // fill every word through alternating ports
    for (int i = 0; i < DEPTH; i++) begin
      @(negedge clk);
      a_en = (i % 2 == 0); a_we = 1'b1; a_addr = AB'(i); a_wdata = cplx_t'($urandom);
      b_en = (i % 2 == 1); b_we = 1'b1; b_addr = AB'(i); b_wdata = cplx_t'($urandom);
      model[i] = (i % 2 == 0) ? a_wdata : b_wdata;
    end
    for (int n = 0; n < 3000; n++) begin
      @(negedge clk);
      a_en = 1'($urandom_range(1)); a_we = 1'($urandom_range(1)); a_addr = AB'($urandom_range(DEPTH - 1));
      b_en = 1'($urandom_range(1)); b_we = 1'($urandom_range(1)); b_addr = AB'($urandom_range(DEPTH - 1));
      if (a_en && a_we && b_en && b_we && a_addr == b_addr) b_we = 1'b0;
      a_wdata = cplx_t'($urandom); b_wdata = cplx_t'($urandom);
      ra = a_en && !a_we; rb = b_en && !b_we;
      if (ra) begin ea = model[a_addr]; seen_a = 1'b1; end
      if (rb) begin eb = model[b_addr]; seen_b = 1'b1; end
      if (a_en && a_we) model[a_addr] = a_wdata;
      if (b_en && b_we) model[b_addr] = b_wdata;
      @(posedge clk) #1;
      checks++;
      if ((seen_a && a_rdata !== ea) || (seen_b && b_rdata !== eb)) begin
        failures++;
        $display("cycle %0d: port A %h (exp %h), port B %h (exp %h)", n, a_rdata, ea, b_rdata, eb);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
