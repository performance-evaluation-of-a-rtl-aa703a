// tb_rhbd_route: exhaustive check of the two-step tree pattern for all 256
// level bit-maps, in both steps, on the upper-rank and on the rank-0 torus,
// against a table written from the child
// positions (which child is reached through which neighbour).
module tb_rhbd_route;
  import jump1_pkg::*;
  logic [7:0]        level_map;
  logic              relay;
  logic              rank0;
  logic [NPORTS-1:0] ports;
  int checks = 0, failures = 0;

  rhbd_route dut (.level_map, .relay, .rank0, .ports);

  // children in printed order; via[c] = link used in step 1, via2[c] = link in step 2
  localparam string NAME [8] = '{"N", "E", "W", "S", "M", "SE", "SW", "SS"};

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int r = 0; r < 4; r++) begin
      for (int v = 0; v < 256; v++) begin
        logic [NPORTS-1:0] exp;
        level_map = 8'(v);
        relay     = r[0];
        rank0     = r[1];
        #1;
        exp = '0;
        for (int c = 0; c < 8; c++) begin
          if (level_map[7 - c]) begin
            if (!relay) begin
              case (NAME[c])
                "N": exp[4] = 1;  "E": exp[5] = 1;  "W": exp[6] = 1;
                "M": exp[8] = 1;  default: exp[7] = 1;   // S and its three children go via S
              endcase
            end else begin
              case (NAME[c])
                "S": exp[8] = 1;  "SE": exp[5] = 1; "SW": exp[6] = 1; "SS": exp[7] = 1;
                default: ;                                   // handled in step 1
              endcase
            end
          end
        end
        if (rank0) exp = {exp[9:8], 4'b0000, exp[7:4]};   // same step on links 0-3
        checks++;
        if (ports !== exp) begin
          failures++;
          $display("FAIL map=%b relay=%0d rank0=%0d ports=%b exp=%b", level_map, relay, rank0, ports, exp);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
