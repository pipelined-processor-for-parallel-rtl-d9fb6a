// tb_ctl_pla: checks the PLA's three output fields for every decode
// register value and every sub-code. The expected table is written out
// here from the parcel semantics (which memory and execution instructions,
// in what order, with which operand field); every DR/sub pair not in it
// must produce no field.
module tb_ctl_pla;
  import msa_pkg::*;
  logic [7:0] dr;
  logic [3:0] sub;
  pla_out_t out;
  ctl_pla dut (.*);
  int checks = 0, failures = 0;

  typedef struct { logic [7:0] dr; int sb; logic [7:0] ad; src_e ads; logic [7:0] e1; src_e e1s; logic [7:0] e2; src_e e2s; } row_t;
  localparam logic [7:0] N = 8'hFF;  // no field
  row_t tbl[$];
  // row for one DR value, any sub-code
  task automatic r(input logic [7:0] d, input logic [7:0] ad, input src_e ads,
                   input logic [7:0] e1, input src_e e1s, input logic [7:0] e2, input src_e e2s);
    tbl.push_back('{d, -1, ad, ads, e1, e1s, e2, e2s});
  endtask
  // row for one DR value and one sub-code
  task automatic rs(input logic [7:0] d, input int sb, input logic [7:0] ad, input src_e ads,
                    input logic [7:0] e1, input src_e e1s, input logic [7:0] e2, input src_e e2s);
    tbl.push_back('{d, sb, ad, ads, e1, e1s, e2, e2s});
  endtask
  task automatic fld(input string nm, input pla_field_t f, input logic [7:0] op, input src_e s);
    checks++;
    if (op == N) begin
      if (f.v) begin failures++; $display("FAIL dr=%h %s should be empty", dr, nm); end
    end else if (!f.v || f.op != op || f.src != s) begin
      failures++; $display("FAIL dr=%h %s: v=%b op=%h src=%0d, expected op=%h src=%0d", dr, nm, f.v, f.op, f.src, op, s);
    end
  endtask

  initial begin
    // leading PEXPR parcels
    r(8'h10, 8'h01, SRC_LO24, 8'h02, SRC_NONE, N, SRC_NONE);   // PSVR: SNVR, QVAL
    r(8'h11, 8'h02, SRC_LO24, 8'h02, SRC_NONE, N, SRC_NONE);   // PSVI: SNVI, QVAL
    r(8'h12, N, SRC_NONE, 8'h01, SRC_LO24, N, SRC_NONE);       // PSVL: IVAL
    r(8'h20, 8'h08, SRC_LO24, N, SRC_NONE, N, SRC_NONE);       // PAVR: SNAR
    // dependent expression parcels, same table after PSVx and PAVR
    for (int fam = 1; fam <= 2; fam++) begin
      r({4'(fam), 4'h8}, N, SRC_NONE, 8'h03, SRC_NIBH, 8'h01, SRC_LO24);      // POVL
      r({4'(fam), 4'h9}, N, SRC_NONE, 8'h01, SRC_HI24, 8'h03, SRC_NIBL);      // PVLO
      r({4'(fam), 4'hA}, 8'h01, SRC_LO24, 8'h03, SRC_NIBH, 8'h02, SRC_NONE);  // POVR
      r({4'(fam), 4'hB}, 8'h01, SRC_HI24, 8'h02, SRC_NONE, 8'h03, SRC_NIBL);  // PVRO
      r({4'(fam), 4'hC}, 8'h02, SRC_LO24, 8'h03, SRC_NIBH, 8'h02, SRC_NONE);  // POVI
      rs({4'(fam), 4'hD}, 0, N, SRC_NONE, 8'h01, SRC_LO24, N, SRC_NONE);      // PVAL
      rs({4'(fam), 4'hD}, 1, 8'h09, SRC_LO24, 8'h02, SRC_NONE, N, SRC_NONE);  // PAOD
      rs({4'(fam), 4'hE}, 0, 8'h01, SRC_LO24, 8'h02, SRC_NONE, N, SRC_NONE);  // PVAR
      rs({4'(fam), 4'hE}, 1, 8'h02, SRC_LO24, 8'h02, SRC_NONE, N, SRC_NONE);  // PVRI
      rs({4'(fam), 4'hE}, 2, 8'h0A, SRC_LO24, 8'h02, SRC_NONE, N, SRC_NONE);  // PAOV
      r({4'(fam), 4'hF}, N, SRC_NONE, 8'h03, SRC_NIBH, 8'h03, SRC_NIB2);      // POPP
    end
    // stores
    r(8'h30, 8'h03, SRC_LO24, 8'h04, SRC_NONE, N, SRC_NONE);
    r(8'h31, 8'h04, SRC_LO24, 8'h04, SRC_NONE, N, SRC_NONE);
    r(8'h32, 8'h05, SRC_LO24, N, SRC_NONE, N, SRC_NONE);
    r(8'h33, 8'h06, SRC_LO24, N, SRC_NONE, N, SRC_NONE);
    r(8'h34, 8'h0B, SRC_LO24, 8'h04, SRC_NONE, N, SRC_NONE);
    r(8'h38, 8'h07, SRC_LO24, N, SRC_NONE, N, SRC_NONE);
    r(8'h39, 8'h0C, SRC_LO24, N, SRC_NONE, N, SRC_NONE);
    r(8'h3A, 8'h0D, SRC_LO24, N, SRC_NONE, N, SRC_NONE);
    // relations
    r(8'h40, 8'h18, SRC_LO24, N, SRC_NONE, N, SRC_NONE);
    r(8'h41, 8'h19, SRC_LO24, N, SRC_NONE, N, SRC_NONE);
    r(8'h44, 8'h10, SRC_LO24, N, SRC_NONE, N, SRC_NONE);
    r(8'h45, 8'h11, SRC_LO24, N, SRC_NONE, N, SRC_NONE);
    r(8'h46, 8'h12, SRC_LO24, N, SRC_NONE, N, SRC_NONE);
    r(8'h47, 8'h13, SRC_LO24, N, SRC_NONE, N, SRC_NONE);
    r(8'h48, 8'h20, SRC_LO24, N, SRC_NONE, N, SRC_NONE);
    // frames
    r(8'h52, 8'h30, SRC_LO24, N, SRC_NONE, N, SRC_NONE);
    r(8'h53, 8'h31, SRC_LO24, N, SRC_NONE, N, SRC_NONE);

    for (int d = 0; d < 256; d++) for (int sb = 0; sb < 16; sb++) begin
      int hit;
      dr = 8'(d); sub = 4'(sb); #1;
      hit = -1;
      foreach (tbl[i]) if (tbl[i].dr == 8'(d) && (tbl[i].sb < 0 || tbl[i].sb == sb)) hit = i;
      if (hit >= 0) begin
        fld("ad", out.ad, tbl[hit].ad, tbl[hit].ads);
        fld("ex1", out.ex1, tbl[hit].e1, tbl[hit].e1s);
        fld("ex2", out.ex2, tbl[hit].e2, tbl[hit].e2s);
      end else begin
        checks++;
        if (out.ad.v || out.ex1.v || out.ex2.v) begin failures++; $display("FAIL dr=%h sub=%h decodes to a field", dr, sub); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin #100000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
