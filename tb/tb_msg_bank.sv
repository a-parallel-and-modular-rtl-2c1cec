// tb_msg_bank: self-checking test of the dual-port message bank.
// Writes random words to random addresses while reading others, keeps a shadow copy of the
// memory, and checks that each read returns the shadow word exactly two cycles after the
// address was presented (and not already after one cycle).
module tb_msg_bank;
  localparam int W = 6, DEPTH = 288, AW = 9;
  logic clk = 0;
  logic rd_en = 0, wr_en = 0;
  logic [AW-1:0] rd_addr = '0, wr_addr = '0;
  logic [W-1:0] rd_data, wr_data = '0;
  msg_bank #(.W(W), .DEPTH(DEPTH)) dut (.*);
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  logic [W-1:0] shadow [DEPTH];
  logic [W-1:0] exp_q [$];
  logic         vld_q [$];

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // fill every word
    for (int a = 0; a < DEPTH; a++) begin
      @(negedge clk);
      wr_en = 1; wr_addr = AW'(a); wr_data = W'($urandom); shadow[a] = wr_data;
    end
    @(negedge clk); wr_en = 0;
    // random traffic: reads of addresses that are not written in the same cycle
    for (int i = 0; i < 3000; i++) begin
      @(negedge clk);
      rd_en   = ($urandom_range(3) != 0);
      rd_addr = AW'($urandom_range(DEPTH - 1));
      wr_en   = $urandom_range(1);
      wr_addr = AW'($urandom_range(DEPTH - 1));
      if (wr_addr == rd_addr) wr_en = 0;
      wr_data = W'($urandom);
      exp_q.push_back(shadow[rd_addr]);
      vld_q.push_back(rd_en);
      @(posedge clk);
      if (wr_en) shadow[wr_addr] = wr_data;
      #1;
      // the read presented one cycle before this edge is due now (two-cycle latency)
      if (exp_q.size() == 2) begin
        logic [W-1:0] e; logic v;
        e = exp_q.pop_front(); v = vld_q.pop_front();
        if (v) begin
          checks++;
          if (rd_data !== e) begin
            failures++;
            $display("read mismatch: got %0h expected %0h", rd_data, e);
          end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
