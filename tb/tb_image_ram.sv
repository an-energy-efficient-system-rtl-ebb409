// tb_image_ram: checks both ports of the image memory.
//
// The host port fills a random set of addresses, the datapath port reads
// them back (one clock latency) and overwrites some, and the host port reads
// the final contents, which are compared with a shadow copy kept here.
module tb_image_ram;
  localparam int W = 12, DEPTH = 16384, AW = 14;
  logic clk = 1'b0;
  logic          a_we = 0, b_we = 0;
  logic [AW-1:0] a_addr = '0, b_addr = '0;
  logic [W-1:0]  a_wdata = '0, b_wdata = '0, a_rdata, b_rdata;
  int checks = 0, failures = 0;

  image_ram #(.W(W), .DEPTH(DEPTH)) dut (.clk, .a_we, .a_addr, .a_wdata, .a_rdata,
                                         .b_we, .b_addr, .b_wdata, .b_rdata);

  always #5 clk = ~clk;

  initial begin
    #(10 * 5000);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [W-1:0]  shadow [int];
  logic [AW-1:0] addrs [256];

  initial begin
    @(posedge clk);
    for (int i = 0; i < 256; i++) begin
      addrs[i] = (i == 0) ? '0 : (i == 1) ? AW'(DEPTH - 1) : AW'($urandom);
      a_we <= 1'b1; a_addr <= addrs[i]; a_wdata <= W'($urandom);
      @(posedge clk);
      shadow[int'(addrs[i])] = a_wdata;
    end
    a_we <= 1'b0;
    // datapath port reads, then overwrites every other address
    for (int i = 0; i < 256; i++) begin
      b_addr <= addrs[i];
      @(posedge clk);
      #1;
      checks++;
      if (b_rdata !== shadow[int'(addrs[i])]) begin
        failures++;
        $display("port B addr %0d: %h expected %h", addrs[i], b_rdata, shadow[int'(addrs[i])]);
      end
      if (i % 2 == 0) begin
        b_we <= 1'b1; b_wdata <= W'($urandom);
        @(posedge clk);
        shadow[int'(addrs[i])] = b_wdata;
        b_we <= 1'b0;
      end
    end
    for (int i = 0; i < 256; i++) begin
      a_addr <= addrs[i];
      @(posedge clk);
      #1;
      checks++;
      if (a_rdata !== shadow[int'(addrs[i])]) begin
        failures++;
        $display("port A addr %0d: %h expected %h", addrs[i], a_rdata, shadow[int'(addrs[i])]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
