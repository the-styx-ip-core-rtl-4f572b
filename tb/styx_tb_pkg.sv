// styx_tb_pkg: Styx message builders for the testbenches.
//
// Each function returns the bytes of one message as a queue, laid out as the
// Styx (9P2000) protocol defines it: size[4] type[1] tag[2] body, integers
// little-endian, strings as len[2] followed by the characters. They are
// written from the protocol, independently of the RTL, and give both the
// stimulus and the expected replies.
package styx_tb_pkg;
  typedef logic [7:0] bq_t[$];

  function automatic bq_t le16(int v);
    bq_t q; q = {8'(v), 8'(v >> 8)}; return q;
  endfunction
  function automatic bq_t le32(longint v);
    bq_t q; q = {8'(v), 8'(v >> 8), 8'(v >> 16), 8'(v >> 24)}; return q;
  endfunction
  function automatic bq_t le64(longint v);
    bq_t q; q = {le32(v), le32(v >> 32)}; return q;
  endfunction
  function automatic bq_t str(string s);
    bq_t q; q = le16(s.len());
    for (int i = 0; i < s.len(); i++) q.push_back(8'(s[i]));
    return q;
  endfunction
  function automatic bq_t bytes(string s);   // characters only
    bq_t q;
    for (int i = 0; i < s.len(); i++) q.push_back(8'(s[i]));
    return q;
  endfunction
  function automatic bq_t raw8(string s);   // 8-byte zero-padded name
    bq_t q;
    for (int i = 0; i < 8; i++) q.push_back(i < s.len() ? 8'(s[i]) : 8'h00);
    return q;
  endfunction
  function automatic bq_t qid(int qtype, int vers, longint path);
    bq_t q; q = {8'(qtype), le32(vers), le64(path)}; return q;
  endfunction
  function automatic bq_t frame(int typ, int tag, bq_t body);
    bq_t q; q = {le32(7 + body.size()), 8'(typ), le16(tag), body}; return q;
  endfunction
  // client instruction: code, length[2], data
  function automatic bq_t inst(int code, bq_t data);
    bq_t q; q = {8'(code), le16(data.size()), data}; return q;
  endfunction

  // T messages
  function automatic bq_t tversion(int tag, int msize, string v);
    return frame(100, tag, {le32(msize), str(v)});
  endfunction
  function automatic bq_t tauth(int tag, int afid, string u, string a);
    return frame(102, tag, {le32(afid), str(u), str(a)});
  endfunction
  function automatic bq_t tattach(int tag, int fid, int afid, string u, string a);
    return frame(104, tag, {le32(fid), le32(afid), str(u), str(a)});
  endfunction
  function automatic bq_t twalk(int tag, int fid, int newfid, string name);
    if (name.len() == 0) return frame(110, tag, {le32(fid), le32(newfid), le16(0)});
    return frame(110, tag, {le32(fid), le32(newfid), le16(1), str(name)});
  endfunction
  function automatic bq_t topen(int tag, int fid, int mode);
    return frame(112, tag, {le32(fid), 8'(mode)});
  endfunction
  function automatic bq_t tread(int tag, int fid, longint off, int cnt);
    return frame(116, tag, {le32(fid), le64(off), le32(cnt)});
  endfunction
  function automatic bq_t twrite(int tag, int fid, longint off, bq_t data);
    return frame(118, tag, {le32(fid), le64(off), le32(data.size()), data});
  endfunction
  function automatic bq_t tclunk(int tag, int fid);
    return frame(120, tag, le32(fid));
  endfunction

  // R messages
  function automatic bq_t rversion(int tag, int msize, string v);
    return frame(101, tag, {le32(msize), str(v)});
  endfunction
  function automatic bq_t rattach(int tag, bq_t q);
    return frame(105, tag, q);
  endfunction
  function automatic bq_t rauth(int tag, bq_t q);
    return frame(103, tag, q);
  endfunction
  function automatic bq_t rwalk(int tag, bq_t q);
    bq_t e;
    if (q.size() == 0) return frame(111, tag, le16(0));
    return frame(111, tag, {le16(1), q});
  endfunction
  function automatic bq_t ropen(int tag, bq_t q, int iounit);
    return frame(113, tag, {q, le32(iounit)});
  endfunction
  function automatic bq_t rread(int tag, bq_t data);
    return frame(117, tag, {le32(data.size()), data});
  endfunction
  function automatic bq_t rwrite(int tag, int cnt);
    return frame(119, tag, le32(cnt));
  endfunction
  function automatic bq_t rclunk(int tag);
    bq_t e;
    return frame(121, tag, e);
  endfunction
  // Rstat of one entry: no uid/gid/muid, mode 0755 | DMDIR for a
  // directory, 0666 for a file, times 0
  function automatic bq_t rstat(int tag, bq_t q, longint len, string name);
    bq_t st;
    int  dir = q[0] == 8'h80;
    st = {le16(0), le32(0), q, le32(dir ? 32'h800001ED : 32'h000001B6), le32(0), le32(0),
          le64(len), str(name), le16(0), le16(0), le16(0)};
    return frame(125, tag, {le16(st.size() + 2), le16(st.size()), st});
  endfunction
  function automatic bq_t rerror(int tag, string msg);
    return frame(107, tag, str(msg));
  endfunction
endpackage
