// dbf_line: H.264 luma edge filter for one line of eight samples across an edge,
// p3 p2 p1 p0 | q0 q1 q2 q3 (combinational).
// The line is filtered only when bS > 0, |p0-q0| < alpha, |p1-p0| < beta and
// |q1-q0| < beta. For bS 1..3 the normal filter moves p0/q0 by a delta clipped to +-tc
// (tc = tc0 + 1 for each side whose |p2-p0| or |q2-q0| is below beta) and p1/q1 by a
// correction clipped to +-tc0 on those sides. For bS = 4 the strong filter rewrites up to
// three samples per side where the side is smooth and |p0-q0| < alpha/4 + 2, else only
// p0/q0 with a 3-tap average. alpha, beta and tc0 come from deblock's tables.
// The document gives the edge order of the macroblock filter; the line filter itself is
// the H.264 one, used here as this design's choice.
module dbf_line (
  input  svc_pkg::pix_t p [4],       // p[0] = p0 nearest the edge
  input  svc_pkg::pix_t q [4],
  input  logic [2:0]    bs,
  input  logic [7:0]    alpha,
  input  logic [4:0]    beta,
  input  logic [4:0]    tc0,
  output svc_pkg::pix_t po [4],
  output svc_pkg::pix_t qo [4]
);
  import svc_pkg::*;
  always_comb begin
    int p0, p1, p2, p3, q0, q1, q2, q3, al, be, ap, aq, tc, dlt;
    logic filt;
    p0 = int'(p[0]); p1 = int'(p[1]); p2 = int'(p[2]); p3 = int'(p[3]);
    q0 = int'(q[0]); q1 = int'(q[1]); q2 = int'(q[2]); q3 = int'(q[3]);
    al = int'(alpha); be = int'(beta);
    po = p; qo = q;
    filt = (bs != 3'd0) && (iabs(p0 - q0) < al) && (iabs(p1 - p0) < be) && (iabs(q1 - q0) < be);
    ap = iabs(p2 - p0); aq = iabs(q2 - q0);
    tc = 0; dlt = 0;
    if (filt) begin
      if (bs < 3'd4) begin
        tc = int'(tc0) + ((ap < be) ? 1 : 0) + ((aq < be) ? 1 : 0);
        dlt = clip3(-tc, tc, (((q0 - p0) <<< 2) + (p1 - q1) + 4) >>> 3);
        po[0] = clip1(p0 + dlt);
        qo[0] = clip1(q0 - dlt);
        if (ap < be) po[1] = pix_t'(p1 + clip3(-int'(tc0), int'(tc0), (p2 + ((p0 + q0 + 1) >>> 1) - (p1 <<< 1)) >>> 1));
        if (aq < be) qo[1] = pix_t'(q1 + clip3(-int'(tc0), int'(tc0), (q2 + ((p0 + q0 + 1) >>> 1) - (q1 <<< 1)) >>> 1));
      end else begin
        if (ap < be && iabs(p0 - q0) < ((al >>> 2) + 2)) begin
          po[0] = pix_t'((p2 + 2*p1 + 2*p0 + 2*q0 + q1 + 4) >>> 3);
          po[1] = pix_t'((p2 + p1 + p0 + q0 + 2) >>> 2);
          po[2] = pix_t'((2*p3 + 3*p2 + p1 + p0 + q0 + 4) >>> 3);
        end else po[0] = pix_t'((2*p1 + p0 + q1 + 2) >>> 2);
        if (aq < be && iabs(p0 - q0) < ((al >>> 2) + 2)) begin
          qo[0] = pix_t'((p1 + 2*p0 + 2*q0 + 2*q1 + q2 + 4) >>> 3);
          qo[1] = pix_t'((p0 + q0 + q1 + q2 + 2) >>> 2);
          qo[2] = pix_t'((2*q3 + 3*q2 + q1 + q0 + p0 + 4) >>> 3);
        end else qo[0] = pix_t'((2*q1 + q0 + p1 + 2) >>> 2);
      end
    end
  end
endmodule
