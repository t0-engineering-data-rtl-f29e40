// tb_t0_vregfile: random traffic on all 8 read and 4 write ports of the vector
// register file, compared every cycle against a reference array.  Writes land
// at the clock edge and are masked per element; reads are combinational; vr0
// always reads zero and ignores writes.  The 4 write ports of one cycle always
// target different rows, as the issue logic guarantees.
module tb_t0_vregfile;
  import t0_pkg::*;
  localparam int NRD = 8, NWR = 4;
  logic clk = 1'b0;
  logic [3:0] rd_reg [NRD];
  logic [1:0] rd_row [NRD];
  vrow_t rd_data [NRD];
  logic wr_en [NWR];
  logic [3:0] wr_reg [NWR];
  logic [1:0] wr_row [NWR];
  logic [NLANES-1:0] wr_mask [NWR];
  vrow_t wr_data [NWR];
  logic [31:0] model [16][32];
  int checks = 0, failures = 0;

  t0_vregfile dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [5:0] used;
    for (int r = 0; r < 16; r++) for (int e = 0; e < 32; e++) model[r][e] = '0;
    // initialise all registers through port 0
    for (int r = 1; r < 16; r++)
      for (int w = 0; w < 4; w++) begin
        @(negedge clk);
        for (int p = 0; p < NWR; p++) wr_en[p] = 0;
        wr_en[0] = 1; wr_reg[0] = 4'(r); wr_row[0] = 2'(w); wr_mask[0] = '1;
        wr_data[0] = '0;
      end
    @(negedge clk);
    wr_en[0] = 0;
    for (int i = 0; i < 5000; i++) begin
      @(negedge clk);
      // compare previous cycle's result via fresh random reads
      for (int p = 0; p < NRD; p++) begin
        rd_reg[p] = 4'($urandom);
        rd_row[p] = 2'($urandom);
      end
      #1;
      for (int p = 0; p < NRD; p++) begin
        checks++;
        for (int e = 0; e < 8; e++)
          if (rd_data[p][e] !== model[rd_reg[p]][8*rd_row[p]+e]) begin
            failures++;
            if (failures < 10)
              $display("FAIL: port %0d vr%0d[%0d] = %h expected %h", p, rd_reg[p],
                       8*rd_row[p]+e, rd_data[p][e], model[rd_reg[p]][8*rd_row[p]+e]);
            break;
          end
      end
      // new writes for this edge
      used = '0;
      for (int p = 0; p < NWR; p++) begin
        logic [5:0] key;
        wr_en[p] = $urandom % 4 != 0;
        wr_reg[p] = 4'($urandom % 4 == 0 ? 0 : $urandom);
        wr_row[p] = 2'($urandom);
        key = {wr_reg[p] == 0 ? 4'd0 : 4'd1, wr_row[p]};
        if (wr_en[p] && wr_reg[p] != 0) begin
          // distinct (reg,row) per port in one cycle
          for (int q = 0; q < p; q++)
            if (wr_en[q] && wr_reg[q] == wr_reg[p] && wr_row[q] == wr_row[p]) wr_en[p] = 0;
        end
        wr_mask[p] = NLANES'($urandom);
        for (int e = 0; e < 8; e++) wr_data[p][e] = $urandom;
        if (wr_en[p] && wr_reg[p] != 0)
          for (int e = 0; e < 8; e++)
            if (wr_mask[p][e]) model[wr_reg[p]][8*wr_row[p]+e] = wr_data[p][e];
      end
    end
    for (int p = 0; p < NRD; p++) begin rd_reg[p] = 0; rd_row[p] = 2'(p); end
    #1;
    for (int p = 0; p < NRD; p++) begin
      checks++;
      if (rd_data[p] != '0) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
