// tb_msa_queue: random test of the two-write-port queue against a
// SystemVerilog queue model. Each cycle it writes 0, 1 or 2 words (only as
// many as fit) and pops when not empty at random; it checks the head word,
// empty, full and count every cycle.
module tb_msa_queue;
  localparam int DEPTH = 3;
  logic clk = 0, rst_n = 0;
  logic [1:0] wr_en;
  logic [1:0][7:0] wr_data;
  logic rd_en, empty, full;
  logic [7:0] rd_data;
  logic [1:0] count;
  msa_queue #(.W(8), .DEPTH(DEPTH), .N_WR(2)) dut (.*);
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  logic [7:0] model[$];
  initial begin
    repeat (5000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    wr_en = 0; wr_data = '0; rd_en = 0;
    repeat (2) @(posedge clk); rst_n = 1;
    for (int cyc = 0; cyc < 2000; cyc++) begin
      int room, nw;
      @(negedge clk);
      // compare state
      checks++;
      if (empty != (model.size() == 0) || full != (model.size() == DEPTH) || int'(count) != model.size() ||
          (model.size() > 0 && rd_data != model[0])) begin
        failures++;
        $display("FAIL cyc %0d: count %0d/%0d head %h/%h", cyc, count, model.size(), rd_data,
                 model.size() ? model[0] : 8'h0);
      end
      rd_en = ($urandom % 3 != 0);
      room = DEPTH - model.size() + ((rd_en && model.size() > 0) ? 1 : 0);
      nw = $urandom % 3; if (nw > room) nw = room;
      wr_en = '0;
      for (int i = 0; i < nw; i++) begin wr_en[i] = 1; wr_data[i] = 8'($urandom); end
      @(posedge clk); #1;
      if (rd_en && model.size() > 0) void'(model.pop_front());
      for (int i = 0; i < nw; i++) model.push_back(wr_data[i]);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
