// tb_chan_regs -- self-checking testbench of the channel register file.
//
// Random writes through the I/O port and the rower port (sometimes both to
// the same word in one cycle, where the rower write must win) are mirrored
// in a reference array; every cycle both read ports, at random addresses,
// and the result port are compared with it. Reset must clear every word.
module tb_chan_regs;
  localparam int unsigned W = 17, DEPTH = 8;

  logic clk = 0, rst_n = 0;
  logic io_we = 0, we = 0;
  logic [2:0] io_addr = '0, waddr = '0, ra = '0, rb = '0;
  logic [W-1:0] io_data = '0, wdata = '0, da, db, res;

  chan_regs #(.W(W), .DEPTH(DEPTH)) dut (
    .clk, .rst_n, .io_we_i(io_we), .io_addr_i(io_addr), .io_data_i(io_data),
    .we_i(we), .waddr_i(waddr), .wdata_i(wdata),
    .raddr_a_i(ra), .rdata_a_o(da), .raddr_b_i(rb), .rdata_b_o(db), .res_o(res));

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  logic [W-1:0] ref_m [DEPTH];

  initial begin
    for (int i = 0; i < int'(DEPTH); i++) ref_m[i] = '0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    for (int k = 0; k < 5000; k++) begin
      io_we   = ($urandom_range(0, 3) == 0);
      io_addr = 3'($urandom);
      io_data = W'($urandom);
      we      = ($urandom_range(0, 1) == 0);
      waddr   = (k % 7 == 0) ? io_addr : 3'($urandom);
      wdata   = W'($urandom);
      ra      = 3'($urandom);
      rb      = 3'($urandom);
      #1;
      checks++;
      if (da != ref_m[ra] || db != ref_m[rb] || res != ref_m[DEPTH-1]) begin
        failures++;
        if (failures < 10) $display("k=%0d read mismatch", k);
      end
      @(posedge clk);
      if (io_we) ref_m[io_addr] = io_data;
      if (we)    ref_m[waddr]   = wdata;
      #1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
