// C2c: code length of every leaf.
//
// After C2a and C2b, Fs(f) holds the parent node of leaf f and L(q) the
// depth of internal node q, so the code length of leaf f is L(Fs(f)) + 1.
// The loop runs over the n leaves, one per cycle, in a three-stage pipeline:
// read Fs(f); read L(Fs(f)); write Len(f). Nothing is written to a table
// that is read, so there are no hazards. Because the leaves are in
// non-increasing frequency order, the lengths come out non-decreasing.
//
// Timing: n + 4 cycles from start to done.
module c2c_len #(
  parameter int unsigned SYM_W = 8,
  parameter int unsigned FW    = 12,
  parameter int unsigned LW    = 5
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             start,
  input  logic [SYM_W:0]   n,
  output logic [SYM_W-1:0] fs_raddr,
  input  logic [FW-1:0]    fs_rdata,
  output logic [SYM_W-1:0] l_raddr,
  input  logic [FW-1:0]    l_rdata,
  output logic             len_we,
  output logic [SYM_W-1:0] len_waddr,
  output logic [LW-1:0]    len_wdata,
  output logic             done
);

  logic             busy, v1, v2;
  logic [SYM_W:0]   f;
  logic [SYM_W-1:0] a1, a2;

  assign fs_raddr  = f[SYM_W-1:0];
  assign l_raddr   = SYM_W'(fs_rdata);
  assign len_we    = v2;
  assign len_waddr = a2;
  assign len_wdata = LW'(l_rdata + 1'b1);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy <= 1'b0; f <= '0; v1 <= 1'b0; v2 <= 1'b0; a1 <= '0; a2 <= '0; done <= 1'b0;
    end else begin
      done <= 1'b0;
      v1 <= busy && (f < n);
      a1 <= f[SYM_W-1:0];
      v2 <= v1;
      a2 <= a1;
      if (start) begin
        busy <= 1'b1; f <= '0;
      end else if (busy) begin
        if (f < n) f <= f + 1'b1;
        else if (!v1 && !v2) begin busy <= 1'b0; done <= 1'b1; end
      end
    end
  end

endmodule
