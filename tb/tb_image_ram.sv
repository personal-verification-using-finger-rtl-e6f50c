// tb_image_ram: self-checking testbench for image_ram.
//
// Writes random words to random addresses (kept in an associative-array
// model), reads them back, checks the one-cycle read latency and that a read
// of an address being written in the same cycle returns the old word.
// The RAM is used at a reduced size (ADDR_W = 12) to keep the run short.
module tb_image_ram;
  localparam int AW = 12;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  int checks = 0;
  int failures = 0;

  logic          we = 1'b0;
  logic [AW-1:0] waddr = '0, raddr = '0;
  logic [7:0]    wdata = '0, rdata;

  image_ram #(.ADDR_W(AW), .DATA_W(8)) dut (.clk, .we, .waddr, .wdata, .raddr, .rdata);

  logic [7:0] model [int];

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int a;
    logic [7:0] expv;
    // Fill every location.
    for (int i = 0; i < 2**AW; i++) begin
      @(negedge clk);
      we = 1'b1; waddr = AW'(i); wdata = 8'($urandom); model[i] = wdata;
    end
    @(negedge clk);
    we = 1'b0;
    // Random reads and writes; the read result is checked one cycle later.
    for (int n = 0; n < 5000; n++) begin
      @(negedge clk);
      a = $urandom_range(0, 2**AW - 1);
      raddr = AW'(a);
      we = 1'($urandom_range(0, 1));
      waddr = ($urandom_range(0, 3) == 0) ? AW'(a) : AW'($urandom);
      wdata = 8'($urandom);
      begin
        expv = model[a];
        if (we) model[int'(waddr)] = wdata;
        @(negedge clk);
        checks++;
        if (rdata !== expv) begin
          failures++;
          $display("FAIL: addr %0d read %0h exp %0h", a, rdata, expv);
        end
        we = 1'b0;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
