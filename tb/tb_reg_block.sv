// tb_reg_block: defaults after reset, writes to each word, address 3 ignored,
// WE restoring the defaults and taking priority over a write.
module tb_reg_block;
  localparam int unsigned W = 256;

  logic           clk = 1'b0, rst_n = 1'b0, WE = 1'b0, wr_en = 1'b0;
  logic [1:0]     wr_addr = '0;
  logic [W-1:0]   wr_data = '0, e, pt;
  logic [W/2-1:0] p, q;
  int checks = 0, failures = 0;

  reg_block dut (.*);

  always #5 clk = ~clk;

  task automatic expect_regs(input logic [W/2-1:0] ep, input logic [W/2-1:0] eq,
                             input logic [W-1:0] ee, input logic [W-1:0] ept, input string what);
    checks++;
    if (p !== ep || q !== eq || e !== ee || pt !== ept) begin
      failures++;
      $display("FAIL %s: p=%h q=%h e=%h pt=%h", what, p, q, e, pt);
    end
  endtask

  task automatic write(input logic [1:0] a, input logic [W-1:0] d, input logic we_also);
    wr_en <= 1'b1; wr_addr <= a; wr_data <= d; WE <= we_also;
    @(posedge clk);
    wr_en <= 1'b0; WE <= 1'b0;
    #1;
  endtask

  localparam logic [W/2-1:0] DP = 128'd113680897410347;
  localparam logic [W/2-1:0] DQ = 128'd7999808077935876437321;
  localparam logic [W-1:0]   DE = 256'd97;
  localparam logic [W-1:0]   DT = 256'ha1124634758798086756746464764;

  initial begin
    #10000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    @(posedge clk);
    #1;
    expect_regs(DP, DQ, DE, DT, "reset defaults");
    rst_n <= 1'b1;
    @(posedge clk);
    write(2'd0, {128'h1234, 128'h5678}, 1'b0);
    expect_regs(128'h5678, 128'h1234, DE, DT, "write word 0");
    write(2'd1, 256'd65537, 1'b0);
    expect_regs(128'h5678, 128'h1234, 256'd65537, DT, "write word 1");
    write(2'd2, '1, 1'b0);
    expect_regs(128'h5678, 128'h1234, 256'd65537, '1, "write word 2");
    write(2'd3, '0, 1'b0);
    expect_regs(128'h5678, 128'h1234, 256'd65537, '1, "address 3 ignored");
    write(2'd1, 256'd3, 1'b1);
    expect_regs(DP, DQ, DE, DT, "WE reload beats write");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
